// proc_regfile: the 32 x 32-bit general-purpose register file.
//
// Two read ports, read combinationally in the decode stage, and one write
// port, written at the rising clock edge by the writeback stage. Register 0
// always reads as zero and ignores writes. A read in the same cycle as a
// write to the same register returns the old value: the pipeline's hazard
// logic (stall or bypass from writeback) covers that case, as the baseline
// pipeline waits while the producer is still in writeback. The registers
// have no reset; software initialises what it reads.
module proc_regfile (
  input  logic        clk,
  input  logic [4:0]  raddr0,
  output logic [31:0] rdata0,
  input  logic [4:0]  raddr1,
  output logic [31:0] rdata1,
  input  logic        wen,
  input  logic [4:0]  waddr,
  input  logic [31:0] wdata
);

  logic [31:0] regs [32];

  always_ff @(posedge clk) begin
    if (wen && waddr != 5'd0) regs[waddr] <= wdata;
  end

  assign rdata0 = (raddr0 == 5'd0) ? 32'd0 : regs[raddr0];
  assign rdata1 = (raddr1 == 5'd0) ? 32'd0 : regs[raddr1];

endmodule
