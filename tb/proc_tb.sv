// proc_tb: self-checking test of the processor (baseline configuration).
//
// Runs the directed and random programs on the processor attached to a
// test source, sink and memory, first with no delays and then with random
// source, sink and memory delays, and compares everything the processor
// sends to the sink with hand-computed values or with the reference
// instruction-set model. It also checks the cycle timing of the baseline
// addu trace: the sum leaves in cycle 21 after reset, with the addu held
// three cycles in decode while the second mfc0 passes X, M and W.
module proc_tb;
  import parc_tb_pkg::*;
  import parc_progs_pkg::*;
  import mem_msg_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;

  logic [31:0] mngr2proc_msg, proc2mngr_msg;
  logic        mngr2proc_val, mngr2proc_rdy, proc2mngr_val, proc2mngr_rdy;
  mem_req_t    imemreq_msg, dmemreq_msg;
  mem_resp_t   imemresp_msg, dmemresp_msg;
  logic        imemreq_val, imemreq_rdy, imemresp_val, imemresp_rdy;
  logic        dmemreq_val, dmemreq_rdy, dmemresp_val, dmemresp_rdy;

  proc dut (.*);
  proc_test_env env (.*);

  int checks = 0, failures = 0;
  int cyc;
  int first_out_cyc;

  always @(posedge clk) begin
    if (reset) begin
      cyc           <= 0;
      first_out_cyc <= -1;
    end else begin
      cyc <= cyc + 1;
      if (proc2mngr_val && proc2mngr_rdy && first_out_cyc < 0) first_out_cyc <= cyc;
    end
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(prog_t p, string name, int max_cycles);
    word_t outs[$];
    int    insts;
    iss_run(p, 1000000, outs, insts);
    if (p.sink.size() == 0) p.sink = outs;
    else begin
      check(outs.size() == p.sink.size(), {name, ": reference output count"});
      foreach (p.sink[k]) if (k < outs.size()) check(outs[k] == p.sink[k], {name, ": reference value"});
    end
    env.clear();
    env.load(p);
    @(posedge clk) reset <= 1'b1;
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    @(posedge clk);
    while (!env.done && cyc < max_cycles) @(posedge clk);
    $display("%s: done=%0d cyc=%0d recv=%0d exp=%0d t=%0t", name, env.done, cyc, env.n_received, env.n_expected, $time);
    check(env.done, {name, ": program finished"});
    check(env.n_bad == 0, {name, ": sink values"});
    check(env.n_good == p.sink.size(), {name, ": sink count"});
  endtask

  initial begin
    fork
      begin
        repeat (400000) @(posedge clk);
        failures++;
        $display("FAIL: watchdog");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join_none

    // Cycle timing of the baseline trace, no delays
    env.configure(0, 0, 1, 0, 0);
    run(addu_trace(), "addu_trace", 200);
    check(first_out_cyc == 21, $sformatf("addu trace: sum sent in cycle %0d, expected 21", first_out_cyc));

    for (int cfg = 0; cfg < 3; cfg++) begin
      case (cfg)
        0: env.configure(0, 0, 1, 0, 0);
        1: env.configure(30, 30, 3, 2, 30);
        default: env.configure(0, 60, 1, 5, 50);
      endcase
      run(addiu_dest_byp(), "addiu_dest_byp", 5000);
      run(multijump(), "multijump", 5000);
      run(array_loop(), "array_loop", 5000);
      run(all_insts(), "all_insts", 20000);
      for (int s = 0; s < 4; s++) run(random_prog(150), "random", 50000);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
