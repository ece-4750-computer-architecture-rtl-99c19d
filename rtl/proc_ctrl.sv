// proc_ctrl: pipelined control unit of the five-stage PARCv2 processor.
//
// Each stage F, D, X, M, W has a valid bit and a register of the control
// signals its instruction still needs; the instruction in D is decoded with
// the control signal table in parc_pkg, and its signals travel down the
// pipeline with it. Every stage computes an "own stall" (ostall_*): F waits
// for the instruction memory response; D waits for a data hazard, for the
// test source (mfc0) or for the multiplier to accept a request (mul); X
// waits for the multiplier's response or for room in the data request
// queue; M waits for the data memory response; W waits for the test sink
// (mtc0). A stage stalls when it or any later stage has an own stall, and
// a stalled stage sends a bubble forward. Jumps (j, jal, jr) redirect the
// fetch from D and squash F; taken branches redirect from X and squash F
// and D. A squashed fetch whose memory response is still in flight is
// handed to the drop unit.
//
// With BYPASS = 0 (the baseline) D stalls until no instruction in X, M or W
// will write a register it reads. With BYPASS = 1 (the alternative) D
// takes such values from the end of X, M or W through bypass muxes and
// stalls only when a load in X produces a register it reads (load-use).
//
// The fetch stage issues a request whenever its slot frees up, and keeps
// its PC when the instruction request queue is full (the next request then
// re-sends the same PC); this retry, the exact stall equations and the
// redirect priority (X over D) are this design's choices. Handshake outputs
// are raised only when the stage also advances, so a valid may depend on a
// ready that the other side computes without looking at valid.
module proc_ctrl
  import parc_pkg::*;
  import mem_msg_pkg::*;
#(
  parameter bit BYPASS = 1'b0
) (
  input  logic        clk,
  input  logic        reset,
  // instruction memory
  output logic        imemreq_val,
  input  logic        imemreq_rdy,
  input  logic        imemresp_val,
  output logic        imemresp_rdy,
  output logic        imemresp_drop,
  // data memory
  output logic        dmemreq_val,
  input  logic        dmemreq_rdy,
  input  logic        dmemresp_val,
  output logic        dmemresp_rdy,
  // test source and sink
  input  logic        mngr2proc_val,
  output logic        mngr2proc_rdy,
  output logic        proc2mngr_val,
  input  logic        proc2mngr_rdy,
  // datapath
  output ctrl2dpath_t c2d,
  input  dpath2ctrl_t d2c
);

  //--------------------------------------------------------------------
  // Pipeline state
  //--------------------------------------------------------------------

  typedef struct packed {
    br_type_e   br_type;
    alu_fn_e    alu_fn;
    logic       mul;
    dmem_e      dmem;
    wb_sel_e    wb_sel;
    logic       rf_wen;
    logic [4:0] rf_waddr;
    logic       mtc0;
  } stage_ctrl_t;

  logic        val_F, val_D, val_X, val_M, val_W;
  stage_ctrl_t cs_X, cs_M, cs_W;

  logic ostall_F, ostall_D, ostall_X, ostall_M, ostall_W;
  logic stall_F, stall_D, stall_X, stall_M, stall_W;
  logic squash_F, squash_D;
  logic redirect_D, redirect_X;
  logic reg_en_F, reg_en_D, reg_en_X, reg_en_M, reg_en_W;

  //--------------------------------------------------------------------
  // D: decode
  //--------------------------------------------------------------------

  ctrl_word_t  cw_D;
  logic [4:0]  rs_D, rt_D;
  assign cw_D = decode(d2c.inst_D);
  assign rs_D = d2c.inst_D[25:21];
  assign rt_D = d2c.inst_D[20:16];

  // Does the instruction in a later stage write register r?
  function automatic logic writes(input logic val, input stage_ctrl_t cs,
                                  input logic [4:0] r);
    return val && cs.rf_wen && (cs.rf_waddr == r) && (r != 5'd0);
  endfunction

  logic rs_X, rs_M, rs_W, rt_X, rt_M, rt_W;
  assign rs_X = cw_D.rs_en && writes(val_X, cs_X, rs_D);
  assign rs_M = cw_D.rs_en && writes(val_M, cs_M, rs_D);
  assign rs_W = cw_D.rs_en && writes(val_W, cs_W, rs_D);
  assign rt_X = cw_D.rt_en && writes(val_X, cs_X, rt_D);
  assign rt_M = cw_D.rt_en && writes(val_M, cs_M, rt_D);
  assign rt_W = cw_D.rt_en && writes(val_W, cs_W, rt_D);

  logic hazard_D;
  if (BYPASS) begin : g_bypass
    // Only a load in X cannot be forwarded in time
    assign hazard_D = (rs_X || rt_X) && (cs_X.dmem == DM_LD);
    assign c2d.op0_byp_sel_D = rs_X ? BYP_X : rs_M ? BYP_M : rs_W ? BYP_W : BYP_RF;
    assign c2d.op1_byp_sel_D = rt_X ? BYP_X : rt_M ? BYP_M : rt_W ? BYP_W : BYP_RF;
  end else begin : g_stall
    assign hazard_D = rs_X || rs_M || rs_W || rt_X || rt_M || rt_W;
    assign c2d.op0_byp_sel_D = BYP_RF;
    assign c2d.op1_byp_sel_D = BYP_RF;
  end

  //--------------------------------------------------------------------
  // Own stalls, stalls and squashes
  //--------------------------------------------------------------------

  assign ostall_F = val_F && !imemresp_val;
  assign ostall_D = val_D && (hazard_D
                              || (cw_D.mfc0 && !mngr2proc_val)
                              || (cw_D.mul && !d2c.imul_req_rdy_D));
  assign ostall_X = val_X && ((cs_X.mul && !d2c.imul_resp_val_X)
                              || (cs_X.dmem != DM_NONE && !dmemreq_rdy));
  assign ostall_M = val_M && (cs_M.dmem != DM_NONE) && !dmemresp_val;
  assign ostall_W = val_W && cs_W.mtc0 && !proc2mngr_rdy;

  assign stall_W = val_W && ostall_W;
  assign stall_M = val_M && (ostall_M || ostall_W);
  assign stall_X = val_X && (ostall_X || ostall_M || ostall_W);
  assign stall_D = val_D && (ostall_D || ostall_X || ostall_M || ostall_W);
  assign stall_F = val_F && (ostall_F || ostall_D || ostall_X || ostall_M || ostall_W);

  // Branch resolution in X
  logic br_taken_X;
  always_comb begin
    unique case (cs_X.br_type)
      BR_BEQ:  br_taken_X = d2c.br_cond_eq_X;
      BR_BNE:  br_taken_X = !d2c.br_cond_eq_X;
      BR_BLEZ: br_taken_X = d2c.br_cond_zero_X || d2c.br_cond_neg_X;
      BR_BGTZ: br_taken_X = !d2c.br_cond_zero_X && !d2c.br_cond_neg_X;
      BR_BLTZ: br_taken_X = d2c.br_cond_neg_X;
      BR_BGEZ: br_taken_X = !d2c.br_cond_neg_X;
      default: br_taken_X = 1'b0;
    endcase
  end

  assign redirect_X = val_X && br_taken_X && !stall_X;
  assign squash_D   = redirect_X;
  assign redirect_D = val_D && (cw_D.j_type != J_NONE) && !stall_D && !squash_D;
  assign squash_F   = redirect_X || redirect_D;

  assign reg_en_F = !stall_F || squash_F;
  assign reg_en_D = !stall_D || squash_D;
  assign reg_en_X = !stall_X;
  assign reg_en_M = !stall_M;
  assign reg_en_W = !stall_W;

  //--------------------------------------------------------------------
  // F: fetch
  //--------------------------------------------------------------------

  // The F slot is free when it is empty, its instruction moves on or it is
  // squashed; a new request is then sent for the next PC.
  assign imemreq_val   = !reset && reg_en_F;
  assign imemresp_rdy  = val_F && reg_en_F;
  assign imemresp_drop = squash_F && val_F && !imemresp_val;

  always_comb begin
    if (redirect_X)
      c2d.pc_sel_F = PC_BR;
    else if (redirect_D)
      c2d.pc_sel_F = (cw_D.j_type == J_JR) ? PC_JR : PC_J;
    else if (val_F)
      c2d.pc_sel_F = PC_SEQ;
    else
      c2d.pc_sel_F = PC_SAME;
  end

  always_ff @(posedge clk) begin
    if (reset)         val_F <= 1'b0;
    else if (reg_en_F) val_F <= imemreq_val && imemreq_rdy;
  end

  //--------------------------------------------------------------------
  // Pipeline registers of the control signals
  //--------------------------------------------------------------------

  stage_ctrl_t cs_D;
  assign cs_D = '{br_type: cw_D.br_type, alu_fn: cw_D.alu_fn, mul: cw_D.mul,
                  dmem: cw_D.dmem, wb_sel: cw_D.wb_sel, rf_wen: cw_D.rf_wen,
                  rf_waddr: cw_D.rf_waddr, mtc0: cw_D.mtc0};

  always_ff @(posedge clk) begin
    if (reset) begin
      val_D <= 1'b0;
      val_X <= 1'b0;
      val_M <= 1'b0;
      val_W <= 1'b0;
    end else begin
      if (reg_en_D) val_D <= val_F && !stall_F && !squash_F;
      if (reg_en_X) val_X <= val_D && !stall_D && !squash_D;
      if (reg_en_M) val_M <= val_X && !stall_X;
      if (reg_en_W) val_W <= val_M && !stall_M;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      cs_X <= '0;
      cs_M <= '0;
      cs_W <= '0;
    end else begin
      if (reg_en_X) cs_X <= cs_D;
      if (reg_en_M) cs_M <= cs_X;
      if (reg_en_W) cs_W <= cs_M;
    end
  end

  //--------------------------------------------------------------------
  // Handshakes and datapath controls
  //--------------------------------------------------------------------

  assign mngr2proc_rdy = val_D && cw_D.mfc0 && !stall_D && !squash_D;
  assign dmemreq_val   = val_X && (cs_X.dmem != DM_NONE) && !stall_X;
  assign dmemresp_rdy  = val_M && (cs_M.dmem != DM_NONE) && !stall_M;
  assign proc2mngr_val = val_W && cs_W.mtc0 && !stall_W;

  assign c2d.reg_en_F        = reg_en_F;
  assign c2d.reg_en_D        = reg_en_D;
  assign c2d.reg_en_X        = reg_en_X;
  assign c2d.reg_en_M        = reg_en_M;
  assign c2d.reg_en_W        = reg_en_W;
  assign c2d.op0_sel_D       = cw_D.op0_sel;
  assign c2d.op1_sel_D       = cw_D.op1_sel;
  assign c2d.imul_req_val_D  = val_D && cw_D.mul && !stall_D && !squash_D;
  assign c2d.alu_fn_X        = cs_X.alu_fn;
  assign c2d.ex_sel_X        = cs_X.mul ? EX_MUL : EX_ALU;
  assign c2d.imul_resp_rdy_X = val_X && cs_X.mul && !stall_X;
  assign c2d.dmem_write_X    = (cs_X.dmem == DM_ST);
  assign c2d.wb_sel_M        = cs_M.wb_sel;
  assign c2d.rf_wen_W        = val_W && cs_W.rf_wen && !stall_W;
  assign c2d.rf_waddr_W      = cs_W.rf_waddr;

  // An instruction the table does not know is a design error in the program
  assert property (@(posedge clk) disable iff (reset) !(val_D && !cw_D.inst_val));

endmodule
