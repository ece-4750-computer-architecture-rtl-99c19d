// test_mem: behavioural model of a two-port test memory with val/rdy
// request and response channels (port 0 for instructions, port 1 for data).
//
// Not synthesizable. A request is accepted when the port is ready; reads
// and writes take effect at acceptance and the response becomes valid
// `latency` cycles later (at least one), plus a random extra delay of up
// to `jitter` cycles, in request order. A port refuses a request with
// probability `stall_pct` percent in any cycle, and holds at most four
// outstanding requests. All outputs change only at the clock edge.
// Words are 32 bits; only full-word accesses are modelled. Counters of
// refused and accepted requests are kept for the testbenches.
module test_mem
  import mem_msg_pkg::*;
#(
  parameter int unsigned WORDS = 16384
) (
  input  logic      clk,
  input  logic      reset,
  input  mem_req_t  req_msg  [2],
  input  logic      req_val  [2],
  output logic      req_rdy  [2],
  output mem_resp_t resp_msg [2],
  output logic      resp_val [2],
  input  logic      resp_rdy [2]
);

  logic [31:0] m [WORDS];

  typedef struct { mem_resp_t resp; longint due; } entry_t;
  entry_t q0[$], q1[$];
  longint cycle;
  longint last_due [2];
  int     refused, accepted;
  int unsigned latency = 1, jitter = 0, stall_pct = 0;

  function automatic mem_resp_t access(mem_req_t r);
    mem_resp_t s;
    int unsigned idx = (r.addr >> 2) % WORDS;
    s.typ    = r.typ;
    s.opaque = r.opaque;
    s.test   = 2'd0;
    s.len    = r.len;
    s.data   = 32'd0;
    if (r.typ == MEM_WRITE) m[idx] = r.data;
    else                    s.data = m[idx];
    return s;
  endfunction

  function automatic longint due_of(int p);
    int unsigned lat   = (latency > 0) ? latency : 1;
    int unsigned extra = (jitter > 0) ? $urandom_range(jitter) : 0;
    longint d = cycle + longint'(lat) + longint'(extra);
    if (d < last_due[p]) d = last_due[p];
    last_due[p] = d;
    return d;
  endfunction

  initial begin
    foreach (m[k]) m[k] = 32'd0;
    refused  = 0;
    accepted = 0;
  end

  always @(posedge clk) begin
    if (reset) begin
      q0.delete();
      q1.delete();
      cycle       = 0;
      last_due[0] = 0;
      last_due[1] = 0;
      req_rdy[0]  <= 1'b1;
      req_rdy[1]  <= 1'b1;
      resp_val[0] <= 1'b0;
      resp_val[1] <= 1'b0;
    end else begin
      // Handshakes of the cycle that ends now
      if (resp_val[0] && resp_rdy[0]) void'(q0.pop_front());
      if (resp_val[1] && resp_rdy[1]) void'(q1.pop_front());
      if (req_val[0] && req_rdy[0]) begin q0.push_back('{access(req_msg[0]), due_of(0)}); accepted++; end
      else if (req_val[0]) refused++;
      if (req_val[1] && req_rdy[1]) begin q1.push_back('{access(req_msg[1]), due_of(1)}); accepted++; end
      else if (req_val[1]) refused++;
      cycle++;
      // Outputs of the next cycle
      req_rdy[0]  <= (q0.size() < 4) && ($urandom_range(99) >= stall_pct);
      req_rdy[1]  <= (q1.size() < 4) && ($urandom_range(99) >= stall_pct);
      resp_val[0] <= (q0.size() > 0) && (q0[0].due <= cycle);
      resp_val[1] <= (q1.size() > 0) && (q1[0].due <= cycle);
      if (q0.size() > 0) resp_msg[0] <= q0[0].resp;
      if (q1.size() > 0) resp_msg[1] <= q1[0].resp;
    end
  end

endmodule
