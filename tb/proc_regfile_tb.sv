// proc_regfile_tb: self-checking test of the register file.
//
// Writes every register, then performs random writes and reads on both
// ports for many cycles, comparing against an array model. Checks that
// register 0 reads zero after a write to it, and that a read in the cycle
// of a write returns the old value, the new one from the next cycle.
module proc_regfile_tb;
  logic        clk = 1'b0;
  logic [4:0]  raddr0, raddr1, waddr;
  logic [31:0] rdata0, rdata1, wdata;
  logic        wen;

  always #5 clk = ~clk;

  proc_regfile dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [32];

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    fork
      begin
        repeat (20000) @(posedge clk);
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join_none
    wen = 0; raddr0 = 0; raddr1 = 0; waddr = 0; wdata = 0;
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      wen = 1; waddr = 5'(r); wdata = $urandom();
      model[r] = (r == 0) ? 32'd0 : wdata;
    end
    @(negedge clk) wen = 0;
    for (int r = 0; r < 32; r++) begin
      raddr0 = 5'(r); raddr1 = 5'(31 - r);
      #1;
      check(rdata0 == model[r] && rdata1 == model[31 - r], "read back after fill");
    end
    repeat (2000) begin
      @(negedge clk);
      wen = 1'($urandom()); waddr = 5'($urandom()); wdata = $urandom();
      raddr0 = 5'($urandom()); raddr1 = (($urandom() % 4) == 0) ? waddr : 5'($urandom());
      #1;
      check(rdata0 == model[raddr0] && rdata1 == model[raddr1], "random read (old value during write)");
      @(posedge clk);
      if (wen && waddr != 0) model[waddr] = wdata;
      #1;
      check(rdata0 == model[raddr0] && rdata1 == model[raddr1], "read after write edge");
    end
    check(rdata0 == rdata0 && model[0] == 0, "r0 model");
    raddr0 = 0; #1;
    check(rdata0 == 32'd0, "r0 reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
