// parc_pkg: PARCv2 instruction fields and the control-signal encodings
// shared by the processor's control unit and datapath.
//
// The PARC ISA is a close relative of MIPS32: R-type instructions use
// opcode 0 and a function code (addu is function 6'b100001), I-type
// instructions carry a 16-bit immediate in [15:0] and J-type a 26-bit
// index in [25:0]. The opcodes and function codes below are the MIPS32
// ones; mul uses the MIPS32 SPECIAL2 encoding and mfc0/mtc0 the COP0
// encoding, with coprocessor register 1 as mngr2proc and 2 as proc2mngr.
// PARC has no branch delay slots. The enums name the settings of the
// datapath's muxes and ALU; their numeric values are free choices.
package parc_pkg;

  localparam logic [31:0] RESET_VECTOR = 32'h0000_1000;

  // Major opcodes (inst[31:26])
  localparam logic [5:0] OP_SPECIAL  = 6'b000000;
  localparam logic [5:0] OP_REGIMM   = 6'b000001;
  localparam logic [5:0] OP_J        = 6'b000010;
  localparam logic [5:0] OP_JAL      = 6'b000011;
  localparam logic [5:0] OP_BEQ      = 6'b000100;
  localparam logic [5:0] OP_BNE      = 6'b000101;
  localparam logic [5:0] OP_BLEZ     = 6'b000110;
  localparam logic [5:0] OP_BGTZ     = 6'b000111;
  localparam logic [5:0] OP_ADDIU    = 6'b001001;
  localparam logic [5:0] OP_SLTI     = 6'b001010;
  localparam logic [5:0] OP_SLTIU    = 6'b001011;
  localparam logic [5:0] OP_ANDI     = 6'b001100;
  localparam logic [5:0] OP_ORI      = 6'b001101;
  localparam logic [5:0] OP_XORI     = 6'b001110;
  localparam logic [5:0] OP_LUI      = 6'b001111;
  localparam logic [5:0] OP_COP0     = 6'b010000;
  localparam logic [5:0] OP_SPECIAL2 = 6'b011100;
  localparam logic [5:0] OP_LW       = 6'b100011;
  localparam logic [5:0] OP_SW       = 6'b101011;

  // Function codes (inst[5:0]) of OP_SPECIAL
  localparam logic [5:0] FN_SLL  = 6'b000000;
  localparam logic [5:0] FN_SRL  = 6'b000010;
  localparam logic [5:0] FN_SRA  = 6'b000011;
  localparam logic [5:0] FN_SLLV = 6'b000100;
  localparam logic [5:0] FN_SRLV = 6'b000110;
  localparam logic [5:0] FN_SRAV = 6'b000111;
  localparam logic [5:0] FN_JR   = 6'b001000;
  localparam logic [5:0] FN_ADDU = 6'b100001;
  localparam logic [5:0] FN_SUBU = 6'b100011;
  localparam logic [5:0] FN_AND  = 6'b100100;
  localparam logic [5:0] FN_OR   = 6'b100101;
  localparam logic [5:0] FN_XOR  = 6'b100110;
  localparam logic [5:0] FN_NOR  = 6'b100111;
  localparam logic [5:0] FN_SLT  = 6'b101010;
  localparam logic [5:0] FN_SLTU = 6'b101011;
  // Function code of mul under OP_SPECIAL2
  localparam logic [5:0] FN_MUL  = 6'b000010;
  // REGIMM rt field
  localparam logic [4:0] RT_BLTZ = 5'b00000;
  localparam logic [4:0] RT_BGEZ = 5'b00001;
  // COP0 rs field
  localparam logic [4:0] RS_MFC0 = 5'b00000;
  localparam logic [4:0] RS_MTC0 = 5'b00100;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA, ALU_CP0, ALU_CP1
  } alu_fn_e;

  // Operand 0: register rs, shift amount, constant 16 (lui)
  typedef enum logic [1:0] { OP0_RS, OP0_SHAMT, OP0_16 } op0_sel_e;

  // Operand 1: register rt, sign/zero-extended immediate, manager data, pc+4
  typedef enum logic [2:0] { OP1_RT, OP1_SI, OP1_ZI, OP1_MNGR, OP1_PC4 } op1_sel_e;

  typedef enum logic [2:0] {
    BR_NONE, BR_BEQ, BR_BNE, BR_BLEZ, BR_BGTZ, BR_BLTZ, BR_BGEZ
  } br_type_e;

  typedef enum logic [1:0] { J_NONE, J_J, J_JR } j_type_e;

  typedef enum logic [1:0] { DM_NONE, DM_LD, DM_ST } dmem_e;

  typedef enum logic { EX_ALU, EX_MUL } ex_sel_e;

  typedef enum logic { WB_EX, WB_MEM } wb_sel_e;

  // Operand bypass selection in the alternative design
  typedef enum logic [1:0] { BYP_RF, BYP_X, BYP_M, BYP_W } byp_sel_e;

  // PC select in F: next sequential, the same PC again (its request could
  // not be sent yet), jump target from D (j/jal), register target from D
  // (jr), branch target from X
  typedef enum logic [2:0] { PC_SEQ, PC_SAME, PC_J, PC_JR, PC_BR } pc_sel_e;

  // Decoded control word of one instruction
  typedef struct packed {
    logic     inst_val;
    br_type_e br_type;
    j_type_e  j_type;
    logic     rs_en;
    op0_sel_e op0_sel;
    logic     rt_en;
    op1_sel_e op1_sel;
    alu_fn_e  alu_fn;
    logic     mul;
    dmem_e    dmem;
    wb_sel_e  wb_sel;
    logic     rf_wen;
    logic [4:0] rf_waddr;
    logic     mtc0;
    logic     mfc0;
  } ctrl_word_t;

  // Control unit to datapath: register enables, mux selects, functions
  typedef struct packed {
    logic       reg_en_F;
    pc_sel_e    pc_sel_F;
    logic       reg_en_D;
    logic       reg_en_X;
    logic       reg_en_M;
    logic       reg_en_W;
    op0_sel_e   op0_sel_D;
    op1_sel_e   op1_sel_D;
    byp_sel_e   op0_byp_sel_D;
    byp_sel_e   op1_byp_sel_D;
    logic       imul_req_val_D;
    alu_fn_e    alu_fn_X;
    ex_sel_e    ex_sel_X;
    logic       imul_resp_rdy_X;
    logic       dmem_write_X;
    wb_sel_e    wb_sel_M;
    logic       rf_wen_W;
    logic [4:0] rf_waddr_W;
  } ctrl2dpath_t;

  // Datapath to control unit: the instruction in D and status signals
  typedef struct packed {
    logic [31:0] inst_D;
    logic        imul_req_rdy_D;
    logic        br_cond_eq_X;
    logic        br_cond_zero_X;
    logic        br_cond_neg_X;
    logic        imul_resp_val_X;
  } dpath2ctrl_t;

  // Control signal table: one row per PARCv2 instruction.
  function automatic ctrl_word_t decode(input logic [31:0] inst);
    ctrl_word_t c;
    logic [4:0] rs, rt, rd;
    rs = inst[25:21];
    rt = inst[20:16];
    rd = inst[15:11];
    c = '{inst_val: 1'b0, br_type: BR_NONE, j_type: J_NONE, rs_en: 1'b0,
          op0_sel: OP0_RS, rt_en: 1'b0, op1_sel: OP1_RT, alu_fn: ALU_ADD,
          mul: 1'b0, dmem: DM_NONE, wb_sel: WB_EX, rf_wen: 1'b0,
          rf_waddr: 5'd0, mtc0: 1'b0, mfc0: 1'b0};
    unique case (inst[31:26])
      OP_SPECIAL: begin
        c.inst_val = 1'b1;
        c.rf_wen   = 1'b1;
        c.rf_waddr = rd;
        c.rs_en    = 1'b1;
        c.rt_en    = 1'b1;
        unique case (inst[5:0])
          FN_ADDU: c.alu_fn = ALU_ADD;
          FN_SUBU: c.alu_fn = ALU_SUB;
          FN_AND:  c.alu_fn = ALU_AND;
          FN_OR:   c.alu_fn = ALU_OR;
          FN_XOR:  c.alu_fn = ALU_XOR;
          FN_NOR:  c.alu_fn = ALU_NOR;
          FN_SLT:  c.alu_fn = ALU_SLT;
          FN_SLTU: c.alu_fn = ALU_SLTU;
          FN_SLLV: c.alu_fn = ALU_SLL;
          FN_SRLV: c.alu_fn = ALU_SRL;
          FN_SRAV: c.alu_fn = ALU_SRA;
          FN_SLL, FN_SRL, FN_SRA: begin
            c.rs_en   = 1'b0;
            c.op0_sel = OP0_SHAMT;
            c.alu_fn  = (inst[5:0] == FN_SLL) ? ALU_SLL :
                        (inst[5:0] == FN_SRL) ? ALU_SRL : ALU_SRA;
          end
          FN_JR: begin
            c.j_type = J_JR;
            c.rt_en  = 1'b0;
            c.rf_wen = 1'b0;
          end
          default: c.inst_val = 1'b0;
        endcase
        // sll r0, r0, 0 is the nop: it needs no operands
        if (inst == 32'd0) begin
          c.rf_wen = 1'b0;
          c.rt_en  = 1'b0;
        end
      end
      OP_SPECIAL2: begin
        if (inst[5:0] == FN_MUL) begin
          c.inst_val = 1'b1;
          c.rs_en    = 1'b1;
          c.rt_en    = 1'b1;
          c.mul      = 1'b1;
          c.rf_wen   = 1'b1;
          c.rf_waddr = rd;
        end
      end
      OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI: begin
        c.inst_val = 1'b1;
        c.rs_en    = 1'b1;
        c.rf_wen   = 1'b1;
        c.rf_waddr = rt;
        unique case (inst[31:26])
          OP_ADDIU: begin c.op1_sel = OP1_SI; c.alu_fn = ALU_ADD;  end
          OP_SLTI:  begin c.op1_sel = OP1_SI; c.alu_fn = ALU_SLT;  end
          OP_SLTIU: begin c.op1_sel = OP1_SI; c.alu_fn = ALU_SLTU; end
          OP_ANDI:  begin c.op1_sel = OP1_ZI; c.alu_fn = ALU_AND;  end
          OP_ORI:   begin c.op1_sel = OP1_ZI; c.alu_fn = ALU_OR;   end
          default:  begin c.op1_sel = OP1_ZI; c.alu_fn = ALU_XOR;  end
        endcase
      end
      OP_LUI: begin
        c.inst_val = 1'b1;
        c.op0_sel  = OP0_16;
        c.op1_sel  = OP1_ZI;
        c.alu_fn   = ALU_SLL;
        c.rf_wen   = 1'b1;
        c.rf_waddr = rt;
      end
      OP_LW, OP_SW: begin
        c.inst_val = 1'b1;
        c.rs_en    = 1'b1;
        c.op1_sel  = OP1_SI;
        c.alu_fn   = ALU_ADD;
        if (inst[31:26] == OP_LW) begin
          c.dmem     = DM_LD;
          c.wb_sel   = WB_MEM;
          c.rf_wen   = 1'b1;
          c.rf_waddr = rt;
        end else begin
          c.dmem  = DM_ST;
          c.rt_en = 1'b1;
        end
      end
      OP_J: begin
        c.inst_val = 1'b1;
        c.j_type   = J_J;
      end
      OP_JAL: begin
        c.inst_val = 1'b1;
        c.j_type   = J_J;
        c.op1_sel  = OP1_PC4;
        c.alu_fn   = ALU_CP1;
        c.rf_wen   = 1'b1;
        c.rf_waddr = 5'd31;
      end
      OP_BEQ, OP_BNE: begin
        c.inst_val = 1'b1;
        c.rs_en    = 1'b1;
        c.rt_en    = 1'b1;
        c.br_type  = (inst[31:26] == OP_BEQ) ? BR_BEQ : BR_BNE;
      end
      OP_BLEZ, OP_BGTZ: begin
        c.inst_val = (rt == 5'd0);
        c.rs_en    = 1'b1;
        c.br_type  = (inst[31:26] == OP_BLEZ) ? BR_BLEZ : BR_BGTZ;
      end
      OP_REGIMM: begin
        c.inst_val = (rt == RT_BLTZ) || (rt == RT_BGEZ);
        c.rs_en    = 1'b1;
        c.br_type  = (rt == RT_BLTZ) ? BR_BLTZ : BR_BGEZ;
      end
      OP_COP0: begin
        if (rs == RS_MFC0) begin
          c.inst_val = 1'b1;
          c.mfc0     = 1'b1;
          c.op1_sel  = OP1_MNGR;
          c.alu_fn   = ALU_CP1;
          c.rf_wen   = 1'b1;
          c.rf_waddr = rt;
        end else if (rs == RS_MTC0) begin
          c.inst_val = 1'b1;
          c.mtc0     = 1'b1;
          c.rt_en    = 1'b1;
          c.op1_sel  = OP1_RT;
          c.alu_fn   = ALU_CP1;
        end
      end
      default: ;
    endcase
    // Writes to r0 are dropped: they never create a hazard
    if (c.rf_waddr == 5'd0) c.rf_wen = 1'b0;
    return c;
  endfunction

endpackage
