// proc_dpath_tb: self-checking test of the datapath on its own.
//
// The testbench plays the control unit: it keeps its own copy of which
// operation is in D, X, M and W, drives the selects and enables for each
// stage, and advances all stages every cycle. It loads registers through
// the test-source path (mfc0), computes with register, immediate and
// shift operands, multiplies, forwards results from X, M and W through
// the bypass muxes (the datapath is built with BYPASS = 1), returns load
// data, and steers the PC through sequential, same, jump, register and
// branch targets. Results are read where the datapath exposes them: the
// data request address and data at the end of X, the test sink data in W.
module proc_dpath_tb;
  import parc_pkg::*;
  import mem_msg_pkg::*;
  import parc_tb_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;

  logic [31:0] imemreq_addr, imemresp_data, dmemresp_data, mngr2proc_data, proc2mngr_data;
  mem_req_t    dmemreq_msg;
  ctrl2dpath_t c2d;
  dpath2ctrl_t d2c;

  proc_dpath #(.BYPASS(1'b1)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (X address %h, W data %h)", what, dmemreq_msg.addr, proc2mngr_data); end
  endtask

  typedef struct packed {
    logic [31:0] inst;
    op0_sel_e    op0_sel;
    op1_sel_e    op1_sel;
    byp_sel_e    byp0, byp1;
    alu_fn_e     alu_fn;
    logic        mul;
    wb_sel_e     wb_sel;
    logic        rf_wen;
    logic [4:0]  waddr;
  } uop_t;

  uop_t st_D, st_X, st_M, st_W;
  uop_t NOP;
  logic hold = 1'b0;   // stall D..W, as while a multiply is in progress

  function automatic uop_t u(logic [31:0] inst, op0_sel_e o0, op1_sel_e o1, alu_fn_e f,
                             logic wen, logic [4:0] wa, byp_sel_e b0 = BYP_RF,
                             byp_sel_e b1 = BYP_RF, wb_sel_e wb = WB_EX, logic m = 1'b0);
    return '{inst: inst, op0_sel: o0, op1_sel: o1, byp0: b0, byp1: b1, alu_fn: f,
             mul: m, wb_sel: wb, rf_wen: wen, waddr: wa};
  endfunction

  // Drive the controls of the operations now in each stage
  always_comb begin
    c2d = '0;
    c2d.reg_en_F        = 1'b1;
    c2d.pc_sel_F        = PC_SEQ;
    c2d.reg_en_D        = !hold;
    c2d.reg_en_X        = !hold;
    c2d.reg_en_M        = !hold;
    c2d.reg_en_W        = !hold;
    c2d.op0_sel_D       = st_D.op0_sel;
    c2d.op1_sel_D       = st_D.op1_sel;
    c2d.op0_byp_sel_D   = st_D.byp0;
    c2d.op1_byp_sel_D   = st_D.byp1;
    c2d.imul_req_val_D  = st_D.mul && !hold;
    c2d.alu_fn_X        = st_X.alu_fn;
    c2d.ex_sel_X        = st_X.mul ? EX_MUL : EX_ALU;
    c2d.imul_resp_rdy_X = st_X.mul && !hold;
    c2d.wb_sel_M        = st_M.wb_sel;
    c2d.rf_wen_W        = st_W.rf_wen;
    c2d.rf_waddr_W      = st_W.waddr;
  end

  // Present `nxt` on the instruction response, clock once: it enters D
  task automatic step(uop_t nxt);
    imemresp_data = nxt.inst;
    @(posedge clk);
    #1;
    st_W = st_M;
    st_M = st_X;
    st_X = st_D;
    st_D = nxt;
    #1;
  endtask

  task automatic bubbles(int n);
    repeat (n) step(NOP);
  endtask

  // Load register r with v through the test-source path
  task automatic setreg(logic [4:0] r, logic [31:0] v);
    mngr2proc_data = v;
    step(u(mfc0(r), OP0_RS, OP1_MNGR, ALU_CP1, 1'b1, r));
    step(NOP);
  endtask

  initial begin
    logic [31:0] a, b;
    fork
      begin
        repeat (5000) @(posedge clk);
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join_none
    NOP = u(32'd0, OP0_RS, OP1_RT, ALU_ADD, 1'b0, 5'd0);
    st_D = NOP; st_X = NOP; st_M = NOP; st_W = NOP;
    imemresp_data = 0; dmemresp_data = 0; mngr2proc_data = 0;
    @(posedge clk);
    @(negedge clk);
    // The PC after reset is 0x1000 and the sequential next PC is 0x1004
    check(imemreq_addr == 32'h1004, "sequential next PC after reset");
    reset = 0;
    bubbles(2);

    a = 32'h1234_5678;
    b = 32'hffff_0003;
    setreg(1, a);
    setreg(2, b);
    bubbles(4);
    // test-source value appears at the sink data in W
    // addu r3, r1, r2 from the register file
    step(u(addu(3, 1, 2), OP0_RS, OP1_RT, ALU_ADD, 1'b1, 3));
    step(NOP);
    check(dmemreq_msg.addr == a + b, "addu in X");
    step(NOP);
    step(NOP);
    check(proc2mngr_data == a + b, "addu result reaches W");
    bubbles(2);
    // back-to-back dependences through X, M and W bypasses
    step(u(addu(4, 1, 2), OP0_RS, OP1_RT, ALU_ADD, 1'b1, 4));
    step(u(subu(5, 4, 1), OP0_RS, OP1_RT, ALU_SUB, 1'b1, 5, BYP_X, BYP_RF));
    check(dmemreq_msg.addr == a + b, "producer in X");
    step(u(xor_(6, 2, 4), OP0_RS, OP1_RT, ALU_XOR, 1'b1, 6, BYP_RF, BYP_M));
    check(dmemreq_msg.addr == b, "bypass from X: (a+b)-a");
    step(u(or_(7, 4, 5), OP0_RS, OP1_RT, ALU_OR, 1'b1, 7, BYP_W, BYP_M));
    check(dmemreq_msg.addr == (b ^ (a + b)), "bypass from M");
    step(NOP);
    check(dmemreq_msg.addr == ((a + b) | b), "bypass from W and M");
    bubbles(4);
    // store data and immediates: sw r1, -4(r2) style address and data
    step(u(sw(1, 16'hfffc, 2), OP0_RS, OP1_SI, ALU_ADD, 1'b0, 0));
    step(NOP);
    check(dmemreq_msg.addr == b - 4 && dmemreq_msg.data == a && dmemreq_msg.typ == MEM_READ,
          "store address, data (type from control)");
    // zero-extended immediate, shift amount, lui constant 16
    step(u(ori(8, 2, 16'h8001), OP0_RS, OP1_ZI, ALU_OR, 1'b1, 8));
    step(u(sra(9, 2, 5'd4), OP0_SHAMT, OP1_RT, ALU_SRA, 1'b1, 9));
    check(dmemreq_msg.addr == (b | 32'h8001), "zero-extended immediate");
    step(u(lui(10, 16'habcd), OP0_16, OP1_ZI, ALU_SLL, 1'b1, 10));
    check(dmemreq_msg.addr == 32'hffff_f000, "shift by shamt field");
    step(NOP);
    check(dmemreq_msg.addr == 32'habcd_0000, "lui");
    bubbles(4);
    // load: data memory response selected in M, written in W
    step(u(lw(11, 0, 1), OP0_RS, OP1_SI, ALU_ADD, 1'b1, 11, BYP_RF, BYP_RF, WB_MEM));
    dmemresp_data = 32'hdead_beef;
    step(NOP);
    step(NOP);
    step(NOP);
    check(proc2mngr_data == 32'hdead_beef, "load data reaches W");
    bubbles(3);
    // multiply: request in D, response in X; the pipeline holds meanwhile
    step(u(mul(12, 1, 2), OP0_RS, OP1_RT, ALU_ADD, 1'b1, 12, BYP_RF, BYP_RF, WB_EX, 1'b1));
    check(d2c.imul_req_rdy_D, "multiplier ready for a request");
    step(NOP);
    check(!d2c.imul_req_rdy_D && !d2c.imul_resp_val_X, "multiplier busy");
    hold = 1'b1;
    begin
      int n;
      n = 0;
      while (!d2c.imul_resp_val_X && n < 40) begin
        @(posedge clk); #1; n++;
      end
      check(n > 1 && n <= 33, "multiplier answers after a variable delay");
    end
    hold = 1'b0;
    step(NOP);
    step(NOP);
    check(proc2mngr_data == a * b, "mul result reaches W");
    // branch conditions in X: beq r1, r1
    step(u(32'h1021_0000, OP0_RS, OP1_RT, ALU_ADD, 1'b0, 0));
    step(NOP);
    check(d2c.br_cond_eq_X && !d2c.br_cond_zero_X && !d2c.br_cond_neg_X, "branch conditions");
    bubbles(3);
    // PC select: same, jump target from D, jr target from D, branch from X
    @(negedge clk);
    force c2d.pc_sel_F = PC_SAME;
    #1 check(imemreq_addr == dut.pc_F, "PC_SAME keeps the PC");
    release c2d.pc_sel_F;
    step(u(32'h0800_0400, OP0_RS, OP1_RT, ALU_ADD, 1'b0, 0));
    force c2d.pc_sel_F = PC_J;
    #1 check(imemreq_addr == {dut.pc_plus4_D[31:28], 26'h000_0400, 2'b00}, "jump target");
    release c2d.pc_sel_F;
    step(u(jr(2), OP0_RS, OP1_RT, ALU_ADD, 1'b0, 0));
    force c2d.pc_sel_F = PC_JR;
    #1 check(imemreq_addr == b, "jr target is rs");
    release c2d.pc_sel_F;
    step(u(32'h1420_0010, OP0_RS, OP1_RT, ALU_ADD, 1'b0, 0));
    a = dut.pc_plus4_D;
    step(NOP);
    force c2d.pc_sel_F = PC_BR;
    #1 check(imemreq_addr == a + 32'h40, "branch target from X");
    release c2d.pc_sel_F;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
