// proc_target_calc: branch and jump target calculation of the decode stage.
//
// The branch target (BrTarget) is the address of the next instruction plus
// the sign-extended 16-bit immediate times four. The jump target (JTarget)
// of j and jal keeps the top four bits of the next instruction's address and
// replaces the rest with the 26-bit index times four. Both use pc+4 because
// PARC has no delay slots and relative offsets count from the next
// instruction, as in MIPS. Purely combinational.
module proc_target_calc (
  input  logic [31:0] pc_plus4,
  input  logic [31:0] inst,
  output logic [31:0] br_target,
  output logic [31:0] j_target
);

  logic [31:0] imm_sext;

  assign imm_sext  = {{16{inst[15]}}, inst[15:0]};
  assign br_target = pc_plus4 + {imm_sext[29:0], 2'b00};
  assign j_target  = {pc_plus4[31:28], inst[25:0], 2'b00};

endmodule
