// proc_target_calc_tb: self-checking test of the branch and jump target
// calculation, with forward, backward and zero offsets and random values.
// Expected targets are computed with integer arithmetic on the address.
module proc_target_calc_tb;
  logic [31:0] pc_plus4, inst, br_target, j_target;

  proc_target_calc dut (.*);

  int checks = 0, failures = 0;

  task automatic apply(logic [31:0] pc4, logic [31:0] w);
    longint off;
    logic [31:0] exp_br, exp_j;
    pc_plus4 = pc4; inst = w;
    #1;
    off    = longint'($signed(w[15:0])) * 4;
    exp_br = 32'(longint'(pc4) + off);
    exp_j  = (pc4 & 32'hf000_0000) + ((w & 32'h03ff_ffff) * 4);
    checks++;
    if (br_target !== exp_br || j_target !== exp_j) begin
      failures++;
      $display("FAIL: pc+4=%h inst=%h br=%h (%h) j=%h (%h)", pc4, w, br_target, exp_br, j_target, exp_j);
    end
  endtask

  initial begin
    fork
      begin
        #100000;
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join_none
    apply(32'h0000_1004, 32'h1420_0000);
    apply(32'h0000_1004, 32'h1420_ffff);
    apply(32'h0000_1004, 32'h1420_0005);
    apply(32'h0000_1004, 32'h1420_8000);
    apply(32'hf000_0004, 32'h0bff_ffff);
    repeat (2000) apply($urandom() & ~32'd3, $urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
