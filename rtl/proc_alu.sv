// proc_alu: the execute-stage ALU of the PARCv2 pipeline.
//
// Computes one of thirteen functions of two 32-bit operands: add, subtract,
// and, or, xor, nor, signed and unsigned set-less-than, and the three
// shifts, which shift operand 1 by the low five bits of operand 0 (so sll,
// srl and sra take the shift amount or register rs on in0 and the value on
// in1; lui is in1 shifted by 16), plus two copy functions that pass in0 or
// in1 through (used by mfc0, mtc0 and jal). It also produces the three
// branch conditions the control unit needs: in0 == in1, in0 == 0 and
// in0 negative. Purely combinational. The function list and the condition
// outputs follow the datapath; the exact encoding is this design's own.
module proc_alu
  import parc_pkg::*;
(
  input  logic [31:0] in0,
  input  logic [31:0] in1,
  input  alu_fn_e     fn,
  output logic [31:0] out,
  output logic        ops_eq,
  output logic        op0_zero,
  output logic        op0_neg
);

  always_comb begin
    unique case (fn)
      ALU_ADD:  out = in0 + in1;
      ALU_SUB:  out = in0 - in1;
      ALU_AND:  out = in0 & in1;
      ALU_OR:   out = in0 | in1;
      ALU_XOR:  out = in0 ^ in1;
      ALU_NOR:  out = ~(in0 | in1);
      ALU_SLT:  out = {31'd0, $signed(in0) < $signed(in1)};
      ALU_SLTU: out = {31'd0, in0 < in1};
      ALU_SLL:  out = in1 << in0[4:0];
      ALU_SRL:  out = in1 >> in0[4:0];
      ALU_SRA:  out = $unsigned($signed(in1) >>> in0[4:0]);
      ALU_CP0:  out = in0;
      ALU_CP1:  out = in1;
      default:  out = in0 + in1;
    endcase
  end

  assign ops_eq   = (in0 == in1);
  assign op0_zero = (in0 == 32'd0);
  assign op0_neg  = in0[31];

endmodule
