// proc_test_env: test harness for one PARCv2 processor: a test source on
// mngr2proc, a test sink on proc2mngr and a two-port test memory on the
// instruction and data channels.
//
// Not synthesizable. load() places a program's code at 0x1000 and its data
// at 0x2000 and queues the values the source sends and the values the sink
// expects. configure() sets the delays: the source holds back its next
// value with probability src_delay_pct percent per cycle, the sink refuses
// with probability sink_delay_pct, and the memory gets a latency, a random
// extra latency and a refusal probability. The
// sink compares every value it receives with the next expected one and
// counts matches and mismatches; `done` rises once every expected value has
// arrived. clear() empties everything before the next program.
module proc_test_env
  import mem_msg_pkg::*;
  import parc_tb_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  output logic [31:0] mngr2proc_msg,
  output logic        mngr2proc_val,
  input  logic        mngr2proc_rdy,
  input  logic [31:0] proc2mngr_msg,
  input  logic        proc2mngr_val,
  output logic        proc2mngr_rdy,
  input  mem_req_t    imemreq_msg,
  input  logic        imemreq_val,
  output logic        imemreq_rdy,
  output mem_resp_t   imemresp_msg,
  output logic        imemresp_val,
  input  logic        imemresp_rdy,
  input  mem_req_t    dmemreq_msg,
  input  logic        dmemreq_val,
  output logic        dmemreq_rdy,
  output mem_resp_t   dmemresp_msg,
  output logic        dmemresp_val,
  input  logic        dmemresp_rdy
);

  mem_req_t  req_msg  [2];
  logic      req_val  [2];
  logic      req_rdy  [2];
  mem_resp_t resp_msg [2];
  logic      resp_val [2];
  logic      resp_rdy [2];

  assign req_msg[0]   = imemreq_msg;
  assign req_val[0]   = imemreq_val;
  assign imemreq_rdy  = req_rdy[0];
  assign imemresp_msg = resp_msg[0];
  assign imemresp_val = resp_val[0];
  assign resp_rdy[0]  = imemresp_rdy;
  assign req_msg[1]   = dmemreq_msg;
  assign req_val[1]   = dmemreq_val;
  assign dmemreq_rdy  = req_rdy[1];
  assign dmemresp_msg = resp_msg[1];
  assign dmemresp_val = resp_val[1];
  assign resp_rdy[1]  = dmemresp_rdy;

  test_mem mem (
    .clk      (clk),
    .reset    (reset),
    .req_msg  (req_msg),
    .req_val  (req_val),
    .req_rdy  (req_rdy),
    .resp_msg (resp_msg),
    .resp_val (resp_val),
    .resp_rdy (resp_rdy)
  );

  logic [31:0] src_q[$], sink_q[$];
  int          n_expected, n_received, n_good, n_bad;
  int          sink_refusals;
  logic        done;
  int unsigned src_delay_pct = 0, sink_delay_pct = 0;

  task automatic configure(int unsigned src, int unsigned sink, int unsigned lat,
                           int unsigned jit, int unsigned stall);
    src_delay_pct  = src;
    sink_delay_pct = sink;
    mem.latency    = lat;
    mem.jitter     = jit;
    mem.stall_pct  = stall;
  endtask

  assign done = (n_received >= n_expected);

  initial begin
    n_expected    = 0;
    n_received    = 0;
    n_good        = 0;
    n_bad         = 0;
    sink_refusals = 0;
  end

  // Empty the source and sink queues, clear the counters and the memory
  task automatic clear();
    src_q.delete();
    sink_q.delete();
    n_expected = 0;
    n_received = 0;
    n_good     = 0;
    n_bad      = 0;
    foreach (mem.m[k]) mem.m[k] = 32'd0;
  endtask

  task automatic load(prog_t p);
    foreach (p.code[k]) mem.m[(CODE_BASE >> 2) + k] = p.code[k];
    foreach (p.data[k]) mem.m[(DATA_BASE >> 2) + k] = p.data[k];
    foreach (p.src[k])  src_q.push_back(p.src[k]);
    foreach (p.sink[k]) sink_q.push_back(p.sink[k]);
    n_expected += p.sink.size();
  endtask

  function automatic logic [31:0] peek(int unsigned addr);
    return mem.m[addr >> 2];
  endfunction

  always @(posedge clk) begin
    if (reset) begin
      mngr2proc_val <= 1'b0;
      proc2mngr_rdy <= 1'b0;
      mngr2proc_msg <= '0;
    end else begin
      if (mngr2proc_val && mngr2proc_rdy) void'(src_q.pop_front());
      if (proc2mngr_val && !proc2mngr_rdy) sink_refusals++;
      if (proc2mngr_val && proc2mngr_rdy) begin
        n_received++;
        if (sink_q.size() == 0) begin
          n_bad++;
          $display("sink: unexpected value %h", proc2mngr_msg);
        end else begin
          if (proc2mngr_msg === sink_q[0]) n_good++;
          else begin
            n_bad++;
            $display("sink: got %h, expected %h", proc2mngr_msg, sink_q[0]);
          end
          void'(sink_q.pop_front());
        end
      end
      mngr2proc_val <= (src_q.size() > 0) && ($urandom_range(99) >= src_delay_pct);
      if (src_q.size() > 0) mngr2proc_msg <= src_q[0];
      proc2mngr_rdy <= ($urandom_range(99) >= sink_delay_pct);
    end
  end

endmodule
