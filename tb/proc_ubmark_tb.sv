// proc_ubmark_tb: benchmark kernels on both processors of the top level.
//
// The five kernels of parc_ubmark_pkg (vector add plain and unrolled,
// complex multiply, binary search, masked filter) run on the stalling and
// the bypassing processor side by side, each with its own test source,
// sink and memory, with every parameter of the top at its default. The
// test memory answers every request in one cycle and the source and sink
// never wait, so the cycle counts reflect the pipelines alone. A second
// pass runs the same kernels with random memory latency, memory refusals
// and source and sink delays, and checks only the results.
//
// Each kernel brackets itself with two messages to the test sink; the
// testbench counts cycles and retired instructions between them and prints
// cycles, instructions and CPI per processor. It checks every output word
// in data memory against values computed in SystemVerilog, that the
// reference instruction-set model accepts the program, that both
// processors retire the same number of instructions, that the bypassing
// processor takes fewer cycles than the stalling one on every kernel, and
// that the unrolled vector add is faster than the plain one on both.
module proc_ubmark_tb;
  import parc_tb_pkg::*;
  import parc_ubmark_pkg::*;
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

  // Kernel timing: cycles and retired instructions while exactly one of
  // the two bracket messages has reached the sink
  int kcyc [2], kinst [2];
  logic retire [2];
  assign retire[0] = dut.base_proc.ctrl.val_W && !dut.base_proc.ctrl.stall_W;
  assign retire[1] = dut.alt_proc.ctrl.val_W && !dut.alt_proc.ctrl.stall_W;

  always @(posedge clk) begin
    if (reset) begin
      kcyc[0] <= 0; kcyc[1] <= 0; kinst[0] <= 0; kinst[1] <= 0;
    end else begin
      if (g_env[0].env.n_received == 1) begin
        kcyc[0] <= kcyc[0] + 1;
        if (retire[0]) kinst[0] <= kinst[0] + 1;
      end
      if (g_env[1].env.n_received == 1) begin
        kcyc[1] <= kcyc[1] + 1;
        if (retire[1]) kinst[1] <= kinst[1] + 1;
      end
    end
  end

  int checks = 0, failures = 0;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Runs one kernel on both processors; returns the two cycle counts
  task automatic run(prog_t p, string name, word_t exp[$], word_t dst, logic timed,
                    output int cyc_b, output int cyc_a);
    word_t outs[$];
    int    insts, bad, t;
    iss_run(p, 1000000, outs, insts);
    check(outs == p.sink, {name, ": reference model runs the kernel"});
    // park the finished processor in a jump-to-self so that it never runs
    // on into the data while the other one is still busy
    p.label("halt");
    p.br(L_J, 0, 0, "halt");
    p.finish();
    g_env[0].env.clear();
    g_env[1].env.clear();
    g_env[0].env.load(p);
    g_env[1].env.load(p);
    @(posedge clk) reset <= 1'b1;
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    t = 0;
    while (!(g_env[0].env.done && g_env[1].env.done) && t < 400000) begin
      @(posedge clk);
      t++;
    end
    repeat (4) @(posedge clk);
    for (int g = 0; g < 2; g++) begin
      bad = 0;
      foreach (exp[k])
        if ((g == 0 ? g_env[0].env.peek(dst + 4 * k) : g_env[1].env.peek(dst + 4 * k)) != exp[k]) bad++;
      check(bad == 0, $sformatf("%s: %0d of %0d output words wrong on the %s processor",
                                name, bad, exp.size(), g == 0 ? "stalling" : "bypassing"));
    end
    check(g_env[0].env.n_good == 2 && g_env[1].env.n_good == 2, {name, ": both kernels finished"});
    check(kinst[0] == kinst[1], $sformatf("%s: same instruction count (%0d, %0d)", name, kinst[0], kinst[1]));
    check(kinst[0] > 0 && kinst[0] <= insts, $sformatf("%s: %0d kernel instructions of %0d", name, kinst[0], insts));
    if (timed)
      check(kcyc[1] < kcyc[0], $sformatf("%s: bypassing %0d cycles, stalling %0d", name, kcyc[1], kcyc[0]));
    if (timed) $display("%-14s instructions %5d   stalling %6d cycles CPI %0.2f   bypassing %6d cycles CPI %0.2f",
             name, kinst[0], kcyc[0], real'(kcyc[0]) / kinst[0], kcyc[1], real'(kcyc[1]) / kinst[1]);
    cyc_b = kcyc[0];
    cyc_a = kcyc[1];
  endtask

  initial begin
    word_t exp[$];
    word_t dst;
    int    ub, ua, ob, oa, xb, xa;
    fork
      begin
        repeat (2000000) @(posedge clk);
        failures++;
        $display("FAIL: watchdog");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join_none
    // first pass timed with ideal memory and manager, second pass with
    // random delays everywhere, checking results only
    for (int pass = 0; pass < 2; pass++) begin
      prog_t p;
      logic  timed;
      timed = (pass == 0);
      if (timed) begin
        g_env[0].env.configure(0, 0, 1, 0, 0);
        g_env[1].env.configure(0, 0, 1, 0, 0);
      end else begin
        g_env[0].env.configure(20, 20, 2, 3, 20);
        g_env[1].env.configure(20, 20, 2, 3, 20);
      end
      p = vvadd(100, 1'b0, exp, dst);          run(p, "vvadd-unopt", exp, dst, timed, ub, ua);
      p = vvadd(100, 1'b1, exp, dst);          run(p, "vvadd-opt", exp, dst, timed, ob, oa);
      if (timed) check(ob < ub && oa < ua, "unrolled vector add is faster on both processors");
      p = cmplx_mult(100, exp, dst);           run(p, "cmplx-mult", exp, dst, timed, xb, xa);
      p = bin_search(100, 20, exp, dst);       run(p, "bin-search", exp, dst, timed, xb, xa);
      p = masked_filter(16, 16, exp, dst);     run(p, "masked-filter", exp, dst, timed, xb, xa);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
