// imul: variable-latency iterative 32-bit integer multiplier with val/rdy
// request and response channels.
//
// A request carries the two operands {a, b} (a in [63:32]); the response is
// the low 32 bits of a * b, which is the same for signed and unsigned
// operands. The unit holds one transaction at a time. It works through b
// one bit per cycle with a shift-and-add step, and stops as soon as the
// remaining bits of b are all zero, so the latency depends on the operands:
// one cycle to accept, one to 32 cycles of work, then the result waits in
// the response register until it is taken. Small multipliers finish fast.
// The pipeline sends a request from decode and takes the response in
// execute. The shift-and-add scheme with early exit is this design's
// choice of a variable-latency multiplier.
module imul (
  input  logic        clk,
  input  logic        reset,
  input  logic        req_val,
  output logic        req_rdy,
  input  logic [63:0] req_msg,
  output logic        resp_val,
  input  logic        resp_rdy,
  output logic [31:0] resp_msg
);

  typedef enum logic [1:0] { S_IDLE, S_CALC, S_DONE } state_e;

  state_e      state;
  logic [31:0] a_reg, b_reg, result;

  assign req_rdy  = (state == S_IDLE);
  assign resp_val = (state == S_DONE);
  assign resp_msg = result;

  always_ff @(posedge clk) begin
    if (reset) begin
      state  <= S_IDLE;
      a_reg  <= '0;
      b_reg  <= '0;
      result <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (req_val) begin
          a_reg  <= req_msg[63:32];
          b_reg  <= req_msg[31:0];
          result <= '0;
          state  <= S_CALC;
        end
        S_CALC: begin
          if (b_reg[0]) result <= result + a_reg;
          a_reg <= a_reg << 1;
          b_reg <= b_reg >> 1;
          if (b_reg[31:1] == 31'd0) state <= S_DONE;
        end
        S_DONE: if (resp_rdy) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
