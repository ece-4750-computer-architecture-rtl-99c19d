// drop_unit_tb: self-checking test of the drop unit.
//
// Without a drop request every response passes through with its message.
// After a drop pulse the next response is accepted from memory but not
// passed on, whether it arrives in the following cycle or many cycles
// later, and the one after it passes again.
module drop_unit_tb;
  logic        clk = 1'b0, reset = 1'b1;
  logic        drop, in_val, in_rdy, out_val, out_rdy;
  logic [46:0] in_msg, out_msg;

  always #5 clk = ~clk;

  drop_unit dut (.*);

  int checks = 0, failures = 0;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Offer one response; report whether the output side saw it
  task automatic respond(logic [46:0] m, output logic seen);
    @(negedge clk);
    in_val = 1; in_msg = m; out_rdy = 1;
    #1;
    seen = out_val;
    check(in_rdy, "response accepted from memory");
    if (out_val) check(out_msg == m, "message passes unchanged");
    @(negedge clk);
    in_val = 0;
  endtask

  initial begin
    logic seen;
    fork
      begin
        repeat (10000) @(posedge clk);
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join_none
    drop = 0; in_val = 0; out_rdy = 1; in_msg = '0;
    repeat (2) @(negedge clk);
    reset = 0;
    for (int k = 0; k < 200; k++) begin
      logic do_drop;
      logic [46:0] m;
      do_drop = ($urandom_range(1) == 1);
      m = {15'($urandom()), 32'($urandom())};
      if (do_drop) begin
        @(negedge clk) drop = 1;
        @(negedge clk) drop = 0;
        repeat ($urandom_range(5)) @(negedge clk);
      end
      respond(m, seen);
      check(seen == !do_drop, do_drop ? "dropped response hidden" : "response passed");
    end
    // back-pressure without a drop: output not ready stalls the input
    @(negedge clk);
    in_val = 1; out_rdy = 0;
    #1;
    check(out_val && !in_rdy, "back-pressure reaches memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
