// proc_top_tb: end-to-end test of the top level, both processors at once.
//
// The stalling and the bypassing processor each get a test source, sink and
// memory, and run the same programs side by side: directed programs with
// hand-computed results and random programs checked against the reference
// instruction-set model, first with no delays and then with random source,
// sink and memory delays. The top keeps all its default parameters.
//
// Every mechanism of the pipeline is counted and must occur at least once:
// decode stalls on a data hazard (baseline), forwarding from X, M and W and
// load-use stalls (alternative), jump and branch redirects, dropped fetches,
// waits for the multiplier to accept and to answer, waits for the data
// memory request and response, waits for the test source and sink, a full
// instruction request queue, and messages buffered in the output queues.
// With no delays the alternative must never take more cycles than the
// baseline on the same program.
module proc_top_tb;
  import parc_tb_pkg::*;
  import parc_progs_pkg::*;
  import mem_msg_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;

  logic [31:0] mngr2proc_msg [2], proc2mngr_msg [2];
  logic        mngr2proc_val [2], mngr2proc_rdy [2], proc2mngr_val [2], proc2mngr_rdy [2];
  mem_req_t    imemreq_msg [2], dmemreq_msg [2];
  mem_resp_t   imemresp_msg [2], dmemresp_msg [2];
  logic        imemreq_val [2], imemreq_rdy [2], imemresp_val [2], imemresp_rdy [2];
  logic        dmemreq_val [2], dmemreq_rdy [2], dmemresp_val [2], dmemresp_rdy [2];

  proc_top dut (
    .clk(clk), .reset(reset),
    .base_mngr2proc_msg(mngr2proc_msg[0]), .base_mngr2proc_val(mngr2proc_val[0]), .base_mngr2proc_rdy(mngr2proc_rdy[0]),
    .base_proc2mngr_msg(proc2mngr_msg[0]), .base_proc2mngr_val(proc2mngr_val[0]), .base_proc2mngr_rdy(proc2mngr_rdy[0]),
    .base_imemreq_msg(imemreq_msg[0]), .base_imemreq_val(imemreq_val[0]), .base_imemreq_rdy(imemreq_rdy[0]),
    .base_imemresp_msg(imemresp_msg[0]), .base_imemresp_val(imemresp_val[0]), .base_imemresp_rdy(imemresp_rdy[0]),
    .base_dmemreq_msg(dmemreq_msg[0]), .base_dmemreq_val(dmemreq_val[0]), .base_dmemreq_rdy(dmemreq_rdy[0]),
    .base_dmemresp_msg(dmemresp_msg[0]), .base_dmemresp_val(dmemresp_val[0]), .base_dmemresp_rdy(dmemresp_rdy[0]),
    .alt_mngr2proc_msg(mngr2proc_msg[1]), .alt_mngr2proc_val(mngr2proc_val[1]), .alt_mngr2proc_rdy(mngr2proc_rdy[1]),
    .alt_proc2mngr_msg(proc2mngr_msg[1]), .alt_proc2mngr_val(proc2mngr_val[1]), .alt_proc2mngr_rdy(proc2mngr_rdy[1]),
    .alt_imemreq_msg(imemreq_msg[1]), .alt_imemreq_val(imemreq_val[1]), .alt_imemreq_rdy(imemreq_rdy[1]),
    .alt_imemresp_msg(imemresp_msg[1]), .alt_imemresp_val(imemresp_val[1]), .alt_imemresp_rdy(imemresp_rdy[1]),
    .alt_dmemreq_msg(dmemreq_msg[1]), .alt_dmemreq_val(dmemreq_val[1]), .alt_dmemreq_rdy(dmemreq_rdy[1]),
    .alt_dmemresp_msg(dmemresp_msg[1]), .alt_dmemresp_val(dmemresp_val[1]), .alt_dmemresp_rdy(dmemresp_rdy[1]));

  for (genvar g = 0; g < 2; g++) begin : g_env
    proc_test_env env (
      .clk(clk), .reset(reset),
      .mngr2proc_msg(mngr2proc_msg[g]), .mngr2proc_val(mngr2proc_val[g]), .mngr2proc_rdy(mngr2proc_rdy[g]),
      .proc2mngr_msg(proc2mngr_msg[g]), .proc2mngr_val(proc2mngr_val[g]), .proc2mngr_rdy(proc2mngr_rdy[g]),
      .imemreq_msg(imemreq_msg[g]), .imemreq_val(imemreq_val[g]), .imemreq_rdy(imemreq_rdy[g]),
      .imemresp_msg(imemresp_msg[g]), .imemresp_val(imemresp_val[g]), .imemresp_rdy(imemresp_rdy[g]),
      .dmemreq_msg(dmemreq_msg[g]), .dmemreq_val(dmemreq_val[g]), .dmemreq_rdy(dmemreq_rdy[g]),
      .dmemresp_msg(dmemresp_msg[g]), .dmemresp_val(dmemresp_val[g]), .dmemresp_rdy(dmemresp_rdy[g]));
  end

  // Mechanism counters
  typedef enum int {
    M_HAZARD_STALL, M_BYP_X, M_BYP_M, M_BYP_W, M_LOAD_USE, M_JUMP, M_BRANCH,
    M_DROP, M_MUL_BUSY, M_MUL_WAIT, M_DMEMREQ_WAIT, M_DMEMRESP_WAIT, M_SRC_WAIT,
    M_SINK_WAIT, M_IMEMREQ_FULL, M_QUEUE_BUFFER, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"hazard stall (baseline)", "bypass from X", "bypass from M",
    "bypass from W", "load-use stall (alternative)", "jump redirect", "branch redirect",
    "dropped fetch", "multiplier busy", "multiplier wait", "data request wait",
    "data response wait", "test source wait", "test sink wait", "two instruction requests queued",
    "output queue buffering"};

  initial foreach (mech[k]) mech[k] = 0;

  always @(posedge clk) if (!reset) begin
    if (dut.base_proc.ctrl.ostall_D && dut.base_proc.ctrl.hazard_D) mech[M_HAZARD_STALL]++;
    if (dut.alt_proc.ctrl.ostall_D && dut.alt_proc.ctrl.hazard_D)   mech[M_LOAD_USE]++;
    if (!dut.alt_proc.ctrl.stall_D && dut.alt_proc.ctrl.val_D) begin
      if (dut.alt_proc.ctrl.rs_X || dut.alt_proc.ctrl.rt_X) mech[M_BYP_X]++;
      if ((dut.alt_proc.ctrl.rs_M && !dut.alt_proc.ctrl.rs_X) || (dut.alt_proc.ctrl.rt_M && !dut.alt_proc.ctrl.rt_X)) mech[M_BYP_M]++;
      if ((dut.alt_proc.ctrl.rs_W && !dut.alt_proc.ctrl.rs_X && !dut.alt_proc.ctrl.rs_M) ||
          (dut.alt_proc.ctrl.rt_W && !dut.alt_proc.ctrl.rt_X && !dut.alt_proc.ctrl.rt_M)) mech[M_BYP_W]++;
    end
  end

  for (genvar g = 0; g < 2; g++) begin : g_count
    if (g == 0) begin : g_b
      always @(posedge clk) if (!reset) count_proc(dut.base_proc.ctrl.redirect_D, dut.base_proc.ctrl.redirect_X,
        dut.base_proc.ctrl.imemresp_drop, dut.base_proc.ctrl.cw_D.mul && !dut.base_proc.d2c.imul_req_rdy_D && dut.base_proc.ctrl.val_D,
        dut.base_proc.ctrl.ostall_X && dut.base_proc.ctrl.cs_X.mul,
        dut.base_proc.ctrl.val_X && dut.base_proc.ctrl.cs_X.dmem != 0 && !dut.base_proc.ctrl.dmemreq_rdy,
        dut.base_proc.ctrl.ostall_M, dut.base_proc.ctrl.val_D && dut.base_proc.ctrl.cw_D.mfc0 && !mngr2proc_val[0],
        dut.base_proc.ctrl.ostall_W, dut.base_proc.imemreq_queue.count == 2,
        dut.base_proc.imemreq_queue.count != 0 || dut.base_proc.dmemreq_queue.count != 0 || dut.base_proc.proc2mngr_queue.count != 0);
    end else begin : g_a
      always @(posedge clk) if (!reset) count_proc(dut.alt_proc.ctrl.redirect_D, dut.alt_proc.ctrl.redirect_X,
        dut.alt_proc.ctrl.imemresp_drop, dut.alt_proc.ctrl.cw_D.mul && !dut.alt_proc.d2c.imul_req_rdy_D && dut.alt_proc.ctrl.val_D,
        dut.alt_proc.ctrl.ostall_X && dut.alt_proc.ctrl.cs_X.mul,
        dut.alt_proc.ctrl.val_X && dut.alt_proc.ctrl.cs_X.dmem != 0 && !dut.alt_proc.ctrl.dmemreq_rdy,
        dut.alt_proc.ctrl.ostall_M, dut.alt_proc.ctrl.val_D && dut.alt_proc.ctrl.cw_D.mfc0 && !mngr2proc_val[1],
        dut.alt_proc.ctrl.ostall_W, dut.alt_proc.imemreq_queue.count == 2,
        dut.alt_proc.imemreq_queue.count != 0 || dut.alt_proc.dmemreq_queue.count != 0 || dut.alt_proc.proc2mngr_queue.count != 0);
    end
  end

  function automatic void count_proc(logic jump, logic branch, logic drop, logic mul_busy,
                                     logic mul_wait, logic dreq, logic dresp, logic src,
                                     logic sink, logic iq_full, logic buffered);
    if (jump)     mech[M_JUMP]++;
    if (branch)   mech[M_BRANCH]++;
    if (drop)     mech[M_DROP]++;
    if (mul_busy) mech[M_MUL_BUSY]++;
    if (mul_wait) mech[M_MUL_WAIT]++;
    if (dreq)     mech[M_DMEMREQ_WAIT]++;
    if (dresp)    mech[M_DMEMRESP_WAIT]++;
    if (src)      mech[M_SRC_WAIT]++;
    if (sink)     mech[M_SINK_WAIT]++;
    if (iq_full)  mech[M_IMEMREQ_FULL]++;
    if (buffered) mech[M_QUEUE_BUFFER]++;
  endfunction

  int checks = 0, failures = 0;
  int cyc;
  int done_cyc [2];

  always @(posedge clk) begin
    if (reset) begin
      cyc         <= 0;
      done_cyc[0] <= -1;
      done_cyc[1] <= -1;
    end else begin
      cyc <= cyc + 1;
      if (g_env[0].env.done && done_cyc[0] < 0) done_cyc[0] <= cyc;
      if (g_env[1].env.done && done_cyc[1] < 0) done_cyc[1] <= cyc;
    end
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(prog_t p, string name, logic compare_cycles);
    word_t outs[$];
    int    insts;
    iss_run(p, 1000000, outs, insts);
    if (p.sink.size() == 0) p.sink = outs;
    else check(outs == p.sink, {name, ": reference model agrees with the expected values"});
    g_env[0].env.clear();
    g_env[1].env.clear();
    g_env[0].env.load(p);
    g_env[1].env.load(p);
    @(posedge clk) reset <= 1'b1;
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    @(posedge clk);
    while (!(g_env[0].env.done && g_env[1].env.done) && cyc < 100000) @(posedge clk);
    repeat (2) @(posedge clk);
    check(g_env[0].env.n_bad == 0 && g_env[0].env.n_good == p.sink.size(), {name, ": baseline output"});
    check(g_env[1].env.n_bad == 0 && g_env[1].env.n_good == p.sink.size(), {name, ": alternative output"});
    if (compare_cycles)
      check(done_cyc[1] <= done_cyc[0],
            $sformatf("%s: alternative %0d cycles, baseline %0d", name, done_cyc[1], done_cyc[0]));
  endtask

  initial begin
    fork
      begin
        repeat (2000000) @(posedge clk);
        failures++;
        $display("FAIL: watchdog");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join_none
    for (int cfg = 0; cfg < 3; cfg++) begin
      for (int g = 0; g < 2; g++)
        case (cfg)
          0: if (g == 0) g_env[0].env.configure(0, 0, 1, 0, 0); else g_env[1].env.configure(0, 0, 1, 0, 0);
          1: if (g == 0) g_env[0].env.configure(30, 30, 3, 2, 30); else g_env[1].env.configure(30, 30, 3, 2, 30);
          default: if (g == 0) g_env[0].env.configure(10, 70, 1, 6, 60); else g_env[1].env.configure(10, 70, 1, 6, 60);
        endcase
      run(addu_trace(), "addu trace", cfg == 0);
      run(load_use(), "load use", cfg == 0);
      run(addiu_dest_byp(), "addiu dest byp", cfg == 0);
      run(multijump(), "multijump", cfg == 0);
      run(mem_burst(), "memory burst", cfg == 0);
      run(array_loop(), "array loop", cfg == 0);
      run(all_insts(), "all instructions", cfg == 0);
      for (int s = 0; s < 5; s++) run(random_prog(200), "random", cfg == 0);
    end
    foreach (mech[k]) begin
      $display("%-30s %0d", mech_name[k], mech[k]);
      check(mech[k] > 0, {"mechanism never happened: ", mech_name[k]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
