// bypass_queue: a val/rdy queue whose empty state lets a message pass
// straight through in the same cycle.
//
// When the queue is empty an arriving message appears on the output at
// once; if the output is not ready, the message is kept in the queue and
// sent later, in order. enq_rdy is high whenever an entry is free, and does
// not depend on deq_rdy, so a producer behind this queue may make its valid
// signal depend on enq_rdy without forming a combinational path through the
// consumer. The processor puts one on each output channel; the instruction
// request queue holds two entries, the others one. Storage is a circular
// buffer with a count; NUM_ENTRIES must be at least one.
module bypass_queue #(
  parameter int unsigned WIDTH       = 32,
  parameter int unsigned NUM_ENTRIES = 1
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             enq_val,
  output logic             enq_rdy,
  input  logic [WIDTH-1:0] enq_msg,
  output logic             deq_val,
  input  logic             deq_rdy,
  output logic [WIDTH-1:0] deq_msg
);

  localparam int unsigned PW = (NUM_ENTRIES > 1) ? $clog2(NUM_ENTRIES) : 1;
  localparam int unsigned CW = $clog2(NUM_ENTRIES + 1);

  logic [WIDTH-1:0] entries [NUM_ENTRIES];
  logic [PW-1:0]    head, tail;
  logic [CW-1:0]    count;
  logic             empty, enq_go, deq_go, pass;

  assign empty   = (count == '0);
  assign enq_rdy = (count != CW'(NUM_ENTRIES));
  assign deq_val = !empty || enq_val;
  assign deq_msg = empty ? enq_msg : entries[head];
  assign enq_go  = enq_val && enq_rdy;
  assign deq_go  = deq_val && deq_rdy;
  // A message that arrives at an empty queue and leaves at once is never stored
  assign pass    = empty && enq_go && deq_go;

  function automatic logic [PW-1:0] incr(input logic [PW-1:0] p);
    return (p == PW'(NUM_ENTRIES - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (reset) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      if (enq_go && !pass) begin
        entries[tail] <= enq_msg;
        tail          <= incr(tail);
      end
      if (deq_go && !pass) head <= incr(head);
      if ((enq_go && !pass) && !(deq_go && !pass)) count <= count + 1'b1;
      else if (!(enq_go && !pass) && (deq_go && !pass)) count <= count - 1'b1;
    end
  end

endmodule
