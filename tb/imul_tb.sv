// imul_tb: self-checking test of the iterative multiplier.
//
// Sends corner and random operand pairs with random gaps between requests
// and random back-pressure on the response, and checks every product
// against the * operator. It also checks the latency: the response becomes
// valid one cycle after acceptance plus one cycle per bit of b up to its
// highest set bit (one cycle when b is zero), and a new request is refused
// while one is in progress.
module imul_tb;
  logic        clk = 1'b0, reset = 1'b1;
  logic        req_val, req_rdy, resp_val, resp_rdy;
  logic [63:0] req_msg;
  logic [31:0] resp_msg;

  always #5 clk = ~clk;

  imul dut (.*);

  int checks = 0, failures = 0;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int iters(logic [31:0] b);
    int h = 0;
    for (int k = 0; k < 32; k++) if (b[k]) h = k;
    return h + 1;
  endfunction

  task automatic one(logic [31:0] a, logic [31:0] b);
    int wait_cycles;
    @(negedge clk);
    repeat ($urandom_range(2)) @(negedge clk);
    check(req_rdy, "ready when idle");
    req_val = 1; req_msg = {a, b};
    @(negedge clk);
    req_val = 0;
    wait_cycles = 1;
    while (!resp_val) begin
      check(!req_rdy, "busy while computing");
      @(negedge clk);
      wait_cycles++;
    end
    check(wait_cycles == iters(b) + 1,
          $sformatf("latency %0d, expected %0d for b=%h", wait_cycles, iters(b) + 1, b));
    repeat ($urandom_range(3)) begin
      check(resp_val && resp_msg == a * b, "response held under back-pressure");
      @(negedge clk);
    end
    check(resp_msg == a * b, $sformatf("%h * %h = %h, got %h", a, b, a * b, resp_msg));
    resp_rdy = 1;
    @(negedge clk);
    resp_rdy = 0;
    check(!resp_val, "response consumed");
  endtask

  initial begin
    fork
      begin
        repeat (100000) @(posedge clk);
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join_none
    req_val = 0; resp_rdy = 0; req_msg = '0;
    repeat (2) @(negedge clk);
    reset = 0;
    one(0, 0);
    one(7, 6);
    one(32'hffff_ffff, 32'hffff_ffff);
    one(32'h8000_0000, 2);
    one(32'h1234_5678, 1);
    one(3, 32'h8000_0000);
    one(32'hffff_fff0, 7);
    repeat (300) one($urandom(), $urandom() >> $urandom_range(31));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
