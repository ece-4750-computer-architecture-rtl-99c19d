// proc_dpath: datapath of the five-stage PARCv2 processor.
//
// F holds the PC register; the next PC is chosen among pc+4, the same PC,
// the jump target from D (j/jal), the register target from D (jr) and the
// branch target from X, and is sent out as the instruction request address
// before the fetch stage, so the instruction returns at the end of F. D
// holds the instruction and pc+4, reads the register file, extends the
// immediates and computes the branch and jump targets; operand 0 is rs, the
// shift amount or the constant 16 (lui), operand 1 is rt, the sign- or
// zero-extended immediate, the test source data (mfc0) or pc+4 (jal). The
// multiplier takes its operands from the D operand muxes and answers in X.
// X holds the two operands, the branch target and the store data, runs the
// ALU and sends the ALU result as the data request address at the end of X,
// so load data returns at the end of M. M chooses between the X result and
// the load data; W writes the register file and drives the test sink data.
//
// With BYPASS = 1 the rs and rt values read in D pass through four-input
// bypass muxes fed by the register file and by the results at the end of X,
// M and W; with BYPASS = 0 those muxes are not built. Pipeline registers
// load when the control unit enables them. The stage structure and the
// names follow the baseline datapath; the mux input orders are this
// design's own.
module proc_dpath
  import parc_pkg::*;
  import mem_msg_pkg::*;
#(
  parameter bit BYPASS = 1'b0
) (
  input  logic        clk,
  input  logic        reset,
  // instruction memory
  output logic [31:0] imemreq_addr,
  input  logic [31:0] imemresp_data,
  // data memory
  output mem_req_t    dmemreq_msg,
  input  logic [31:0] dmemresp_data,
  // test source and sink
  input  logic [31:0] mngr2proc_data,
  output logic [31:0] proc2mngr_data,
  // control unit
  input  ctrl2dpath_t c2d,
  output dpath2ctrl_t d2c
);

  //--------------------------------------------------------------------
  // F
  //--------------------------------------------------------------------

  logic [31:0] pc_F, pc_plus4_F, pc_next_F;
  logic [31:0] j_target_D, jr_target_D, br_target_X;

  assign pc_plus4_F = pc_F + 32'd4;

  always_comb begin
    unique case (c2d.pc_sel_F)
      PC_SEQ:  pc_next_F = pc_plus4_F;
      PC_J:    pc_next_F = j_target_D;
      PC_JR:   pc_next_F = jr_target_D;
      PC_BR:   pc_next_F = br_target_X;
      default: pc_next_F = pc_F;
    endcase
  end

  assign imemreq_addr = pc_next_F;

  always_ff @(posedge clk) begin
    if (reset)             pc_F <= RESET_VECTOR;
    else if (c2d.reg_en_F) pc_F <= pc_next_F;
  end

  //--------------------------------------------------------------------
  // D
  //--------------------------------------------------------------------

  logic [31:0] inst_D, pc_plus4_D;

  always_ff @(posedge clk) begin
    if (reset) begin
      inst_D     <= '0;
      pc_plus4_D <= '0;
    end else if (c2d.reg_en_D) begin
      inst_D     <= imemresp_data;
      pc_plus4_D <= pc_plus4_F;
    end
  end

  logic [31:0] rf_rdata0_D, rf_rdata1_D, rf_wdata_W;
  logic [31:0] ex_result_X, wb_result_M, wb_result_W;

  proc_regfile rfile (
    .clk    (clk),
    .raddr0 (inst_D[25:21]),
    .rdata0 (rf_rdata0_D),
    .raddr1 (inst_D[20:16]),
    .rdata1 (rf_rdata1_D),
    .wen    (c2d.rf_wen_W),
    .waddr  (c2d.rf_waddr_W),
    .wdata  (rf_wdata_W)
  );

  logic [31:0] rs_D, rt_D;

  if (BYPASS) begin : g_bypass
    always_comb begin
      unique case (c2d.op0_byp_sel_D)
        BYP_X:   rs_D = ex_result_X;
        BYP_M:   rs_D = wb_result_M;
        BYP_W:   rs_D = wb_result_W;
        default: rs_D = rf_rdata0_D;
      endcase
      unique case (c2d.op1_byp_sel_D)
        BYP_X:   rt_D = ex_result_X;
        BYP_M:   rt_D = wb_result_M;
        BYP_W:   rt_D = wb_result_W;
        default: rt_D = rf_rdata1_D;
      endcase
    end
  end else begin : g_no_bypass
    assign rs_D = rf_rdata0_D;
    assign rt_D = rf_rdata1_D;
  end

  logic [31:0] imm_sext_D, imm_zext_D, shamt_zext_D, br_target_D;
  assign imm_sext_D   = {{16{inst_D[15]}}, inst_D[15:0]};
  assign imm_zext_D   = {16'd0, inst_D[15:0]};
  assign shamt_zext_D = {27'd0, inst_D[10:6]};

  proc_target_calc targets (
    .pc_plus4  (pc_plus4_D),
    .inst      (inst_D),
    .br_target (br_target_D),
    .j_target  (j_target_D)
  );
  assign jr_target_D = rs_D;

  logic [31:0] op0_D, op1_D;

  always_comb begin
    unique case (c2d.op0_sel_D)
      OP0_SHAMT: op0_D = shamt_zext_D;
      OP0_16:    op0_D = 32'd16;
      default:   op0_D = rs_D;
    endcase
    unique case (c2d.op1_sel_D)
      OP1_SI:   op1_D = imm_sext_D;
      OP1_ZI:   op1_D = imm_zext_D;
      OP1_MNGR: op1_D = mngr2proc_data;
      OP1_PC4:  op1_D = pc_plus4_D;
      default:  op1_D = rt_D;
    endcase
  end

  // Multiplier: request from D, response in X
  logic [31:0] imul_resp_X;

  imul mul (
    .clk      (clk),
    .reset    (reset),
    .req_val  (c2d.imul_req_val_D),
    .req_rdy  (d2c.imul_req_rdy_D),
    .req_msg  ({op0_D, op1_D}),
    .resp_val (d2c.imul_resp_val_X),
    .resp_rdy (c2d.imul_resp_rdy_X),
    .resp_msg (imul_resp_X)
  );

  //--------------------------------------------------------------------
  // X
  //--------------------------------------------------------------------

  logic [31:0] op0_X, op1_X, dmem_wdata_X, alu_out_X;

  always_ff @(posedge clk) begin
    if (reset) begin
      op0_X        <= '0;
      op1_X        <= '0;
      br_target_X  <= '0;
      dmem_wdata_X <= '0;
    end else if (c2d.reg_en_X) begin
      op0_X        <= op0_D;
      op1_X        <= op1_D;
      br_target_X  <= br_target_D;
      dmem_wdata_X <= rt_D;
    end
  end

  proc_alu alu (
    .in0      (op0_X),
    .in1      (op1_X),
    .fn       (c2d.alu_fn_X),
    .out      (alu_out_X),
    .ops_eq   (d2c.br_cond_eq_X),
    .op0_zero (d2c.br_cond_zero_X),
    .op0_neg  (d2c.br_cond_neg_X)
  );

  assign ex_result_X = (c2d.ex_sel_X == EX_MUL) ? imul_resp_X : alu_out_X;

  assign dmemreq_msg = '{typ:    c2d.dmem_write_X ? MEM_WRITE : MEM_READ,
                         opaque: 8'd0,
                         addr:   alu_out_X,
                         len:    2'd0,
                         data:   dmem_wdata_X};

  //--------------------------------------------------------------------
  // M
  //--------------------------------------------------------------------

  logic [31:0] ex_result_M;

  always_ff @(posedge clk) begin
    if (reset)             ex_result_M <= '0;
    else if (c2d.reg_en_M) ex_result_M <= ex_result_X;
  end

  assign wb_result_M = (c2d.wb_sel_M == WB_MEM) ? dmemresp_data : ex_result_M;

  //--------------------------------------------------------------------
  // W
  //--------------------------------------------------------------------

  always_ff @(posedge clk) begin
    if (reset)             wb_result_W <= '0;
    else if (c2d.reg_en_W) wb_result_W <= wb_result_M;
  end

  assign rf_wdata_W     = wb_result_W;
  assign proc2mngr_data = wb_result_W;
  assign d2c.inst_D     = inst_D;

endmodule
