// drop_unit: discards the next instruction memory response after a squash.
//
// A memory request cannot be cancelled once sent. When the fetch stage is
// squashed while its instruction is still in flight, it pulses `drop`; the
// unit then remembers to swallow the next response that arrives from
// memory (accepting it without passing it on). Otherwise responses pass
// through unchanged. Only one response is ever pending a drop: after a
// squash the fetch stage issues one new request, and nothing younger can
// squash again before that response is delivered. An assertion checks it.
module drop_unit #(
  parameter int unsigned WIDTH = 47
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             drop,
  input  logic             in_val,
  output logic             in_rdy,
  input  logic [WIDTH-1:0] in_msg,
  output logic             out_val,
  input  logic             out_rdy,
  output logic [WIDTH-1:0] out_msg
);

  logic pending;

  assign out_val = in_val && !pending;
  assign out_msg = in_msg;
  assign in_rdy  = pending || out_rdy;

  always_ff @(posedge clk) begin
    if (reset)                    pending <= 1'b0;
    else if (drop)                pending <= 1'b1;
    else if (pending && in_val)   pending <= 1'b0;
  end

  // A second drop request while one is pending would be lost
  assert property (@(posedge clk) disable iff (reset) !(drop && pending && !in_val));

endmodule
