// proc_ctrl_tb: cycle-exact test of the pipelined control unit.
//
// The control unit is exercised inside two complete processors, one built
// as the stalling baseline and one as the bypassing alternative, running
// the same short programs with a one-cycle memory and no source or sink
// delays. For each program the testbench checks the value sent to the sink,
// the cycle in which it leaves, the number of cycles decode spends stalled
// on a data hazard, and the number of redirects from D (jumps) and X
// (taken branches). The expected numbers follow from the five-stage timing:
// with the first instruction in decode in cycle 2, a result can be read by
// decode once its producer has left writeback (baseline) or at once from
// X, M or W (alternative), except that a load's value is available only
// from M. A last run with a slow memory checks that a squashed fetch still
// in flight is dropped.
module proc_ctrl_tb;
  import parc_tb_pkg::*;
  import parc_progs_pkg::*;
  import mem_msg_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;

  // Channels of the two processors, index 0 baseline, 1 alternative
  logic [31:0] mngr2proc_msg [2], proc2mngr_msg [2];
  logic        mngr2proc_val [2], mngr2proc_rdy [2], proc2mngr_val [2], proc2mngr_rdy [2];
  mem_req_t    imemreq_msg [2], dmemreq_msg [2];
  mem_resp_t   imemresp_msg [2], dmemresp_msg [2];
  logic        imemreq_val [2], imemreq_rdy [2], imemresp_val [2], imemresp_rdy [2];
  logic        dmemreq_val [2], dmemreq_rdy [2], dmemresp_val [2], dmemresp_rdy [2];

  for (genvar g = 0; g < 2; g++) begin : g_sys
    proc #(.BYPASS(g == 1)) dut (
      .clk(clk), .reset(reset),
      .mngr2proc_msg(mngr2proc_msg[g]), .mngr2proc_val(mngr2proc_val[g]), .mngr2proc_rdy(mngr2proc_rdy[g]),
      .proc2mngr_msg(proc2mngr_msg[g]), .proc2mngr_val(proc2mngr_val[g]), .proc2mngr_rdy(proc2mngr_rdy[g]),
      .imemreq_msg(imemreq_msg[g]), .imemreq_val(imemreq_val[g]), .imemreq_rdy(imemreq_rdy[g]),
      .imemresp_msg(imemresp_msg[g]), .imemresp_val(imemresp_val[g]), .imemresp_rdy(imemresp_rdy[g]),
      .dmemreq_msg(dmemreq_msg[g]), .dmemreq_val(dmemreq_val[g]), .dmemreq_rdy(dmemreq_rdy[g]),
      .dmemresp_msg(dmemresp_msg[g]), .dmemresp_val(dmemresp_val[g]), .dmemresp_rdy(dmemresp_rdy[g]));
    proc_test_env env (
      .clk(clk), .reset(reset),
      .mngr2proc_msg(mngr2proc_msg[g]), .mngr2proc_val(mngr2proc_val[g]), .mngr2proc_rdy(mngr2proc_rdy[g]),
      .proc2mngr_msg(proc2mngr_msg[g]), .proc2mngr_val(proc2mngr_val[g]), .proc2mngr_rdy(proc2mngr_rdy[g]),
      .imemreq_msg(imemreq_msg[g]), .imemreq_val(imemreq_val[g]), .imemreq_rdy(imemreq_rdy[g]),
      .imemresp_msg(imemresp_msg[g]), .imemresp_val(imemresp_val[g]), .imemresp_rdy(imemresp_rdy[g]),
      .dmemreq_msg(dmemreq_msg[g]), .dmemreq_val(dmemreq_val[g]), .dmemreq_rdy(dmemreq_rdy[g]),
      .dmemresp_msg(dmemresp_msg[g]), .dmemresp_val(dmemresp_val[g]), .dmemresp_rdy(dmemresp_rdy[g]));

    int out_cyc, hazard_cycles, jumps, branches, drops;
    always @(posedge clk) begin
      if (reset) begin
        out_cyc <= -1; hazard_cycles <= 0; jumps <= 0; branches <= 0; drops <= 0;
      end else begin
        if (proc2mngr_val[g] && proc2mngr_rdy[g] && out_cyc < 0) out_cyc <= cyc;
        if (dut.ctrl.ostall_D && dut.ctrl.hazard_D) hazard_cycles <= hazard_cycles + 1;
        if (dut.ctrl.redirect_D) jumps <= jumps + 1;
        if (dut.ctrl.redirect_X) branches <= branches + 1;
        if (dut.ctrl.imemresp_drop) drops <= drops + 1;
      end
    end
  end

  int checks = 0, failures = 0;
  int cyc;

  always @(posedge clk) begin
    if (reset) cyc <= 0;
    else       cyc <= cyc + 1;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(prog_t p, string name, int out_b, int out_a, int haz_b, int haz_a,
                     int jumps, int branches);
    g_sys[0].env.clear();
    g_sys[1].env.clear();
    g_sys[0].env.load(p);
    g_sys[1].env.load(p);
    @(posedge clk) reset <= 1'b1;
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    @(posedge clk);
    while (!(g_sys[0].env.done && g_sys[1].env.done) && cyc < 2000) @(posedge clk);
    repeat (2) @(posedge clk);
    check(g_sys[0].env.n_bad == 0 && g_sys[0].env.n_good == p.sink.size(), {name, ": baseline output"});
    check(g_sys[1].env.n_bad == 0 && g_sys[1].env.n_good == p.sink.size(), {name, ": alternative output"});
    if (out_b >= 0) begin
      check(g_sys[0].out_cyc == out_b, $sformatf("%s: baseline output in cycle %0d, expected %0d", name, g_sys[0].out_cyc, out_b));
      check(g_sys[1].out_cyc == out_a, $sformatf("%s: alternative output in cycle %0d, expected %0d", name, g_sys[1].out_cyc, out_a));
      check(g_sys[0].hazard_cycles == haz_b, $sformatf("%s: baseline hazard stalls %0d, expected %0d", name, g_sys[0].hazard_cycles, haz_b));
      check(g_sys[1].hazard_cycles == haz_a, $sformatf("%s: alternative hazard stalls %0d, expected %0d", name, g_sys[1].hazard_cycles, haz_a));
      check(g_sys[0].jumps == jumps && g_sys[1].jumps == jumps,
            $sformatf("%s: %0d/%0d jump redirects, expected %0d", name, g_sys[0].jumps, g_sys[1].jumps, jumps));
      check(g_sys[0].branches == branches && g_sys[1].branches == branches,
            $sformatf("%s: %0d/%0d branch redirects, expected %0d", name, g_sys[0].branches, g_sys[1].branches, branches));
    end
  endtask

  initial begin
    fork
      begin
        repeat (50000) @(posedge clk);
        failures++;
        $display("FAIL: watchdog");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join_none
    g_sys[0].env.configure(0, 0, 1, 0, 0);
    g_sys[1].env.configure(0, 0, 1, 0, 0);
    //                                out_b out_a haz_b haz_a jumps branches
    run(addu_trace(),    "addu trace",  21,   18,   3,    0,    0,    0);
    run(load_use(),      "load use",    19,   14,   6,    1,    0,    0);
    run(jump_timing(),   "jump",         9,    8,   1,    0,    1,    0);
    run(branch_timing(), "branch",      12,   12,   0,    0,    0,    1);
    // A slow instruction memory: jumps squash fetches still in flight
    g_sys[0].env.configure(0, 0, 4, 0, 0);
    g_sys[1].env.configure(0, 0, 4, 0, 0);
    run(multijump(), "multijump, slow memory", -1, -1, 0, 0, 0, 0);
    check(g_sys[0].drops == 3 && g_sys[1].drops == 3,
          $sformatf("drops of squashed fetches: %0d and %0d, expected 3", g_sys[0].drops, g_sys[1].drops));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
