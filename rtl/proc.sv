// proc: a five-stage pipelined PARCv2 processor with latency-insensitive
// val/rdy interfaces.
//
// Six val/rdy channels connect it to the outside: mngr2proc and proc2mngr
// to a test source and sink (read by mfc0, written by mtc0), and request
// and response channels to an instruction memory and a data memory. A
// memory may answer any number of cycles (at least one) after it accepts a
// request, and may refuse requests; the processor waits as needed.
//
// The module joins the control unit and the datapath and adds, as in the
// processor composition, a bypass queue on each output channel (two
// entries on imemreq so that a redirected fetch always finds room, one on
// dmemreq and proc2mngr) and a drop unit on imemresp that discards the
// response of a squashed fetch. BYPASS selects the baseline stalling
// pipeline (0) or the fully-bypassed alternative (1). Requests carry the
// opaque field zero and length zero (a full word). Responses are matched
// to requests by order alone, so only their data bits are used; their
// type, opaque, test and length fields are ignored.
module proc
  import parc_pkg::*;
  import mem_msg_pkg::*;
#(
  parameter bit BYPASS = 1'b0
) (
  input  logic        clk,
  input  logic        reset,

  input  logic [31:0] mngr2proc_msg,
  input  logic        mngr2proc_val,
  output logic        mngr2proc_rdy,

  output logic [31:0] proc2mngr_msg,
  output logic        proc2mngr_val,
  input  logic        proc2mngr_rdy,

  output mem_req_t    imemreq_msg,
  output logic        imemreq_val,
  input  logic        imemreq_rdy,

  input  mem_resp_t   imemresp_msg,
  input  logic        imemresp_val,
  output logic        imemresp_rdy,

  output mem_req_t    dmemreq_msg,
  output logic        dmemreq_val,
  input  logic        dmemreq_rdy,

  input  mem_resp_t   dmemresp_msg,
  input  logic        dmemresp_val,
  output logic        dmemresp_rdy
);

  ctrl2dpath_t c2d;
  dpath2ctrl_t d2c;

  // Internal sides of the queues and the drop unit
  logic        imemreq_enq_val, imemreq_enq_rdy;
  logic [31:0] imemreq_addr;
  mem_req_t    imemreq_enq_msg;
  logic        dmemreq_enq_val, dmemreq_enq_rdy;
  mem_req_t    dmemreq_enq_msg;
  logic        proc2mngr_enq_val, proc2mngr_enq_rdy;
  logic [31:0] proc2mngr_enq_msg;
  logic        imemresp_drop, imemresp_out_val, imemresp_out_rdy;
  mem_resp_t   imemresp_out_msg;

  proc_ctrl #(.BYPASS(BYPASS)) ctrl (
    .clk           (clk),
    .reset         (reset),
    .imemreq_val   (imemreq_enq_val),
    .imemreq_rdy   (imemreq_enq_rdy),
    .imemresp_val  (imemresp_out_val),
    .imemresp_rdy  (imemresp_out_rdy),
    .imemresp_drop (imemresp_drop),
    .dmemreq_val   (dmemreq_enq_val),
    .dmemreq_rdy   (dmemreq_enq_rdy),
    .dmemresp_val  (dmemresp_val),
    .dmemresp_rdy  (dmemresp_rdy),
    .mngr2proc_val (mngr2proc_val),
    .mngr2proc_rdy (mngr2proc_rdy),
    .proc2mngr_val (proc2mngr_enq_val),
    .proc2mngr_rdy (proc2mngr_enq_rdy),
    .c2d           (c2d),
    .d2c           (d2c)
  );

  proc_dpath #(.BYPASS(BYPASS)) dpath (
    .clk            (clk),
    .reset          (reset),
    .imemreq_addr   (imemreq_addr),
    .imemresp_data  (imemresp_out_msg.data),
    .dmemreq_msg    (dmemreq_enq_msg),
    .dmemresp_data  (dmemresp_msg.data),
    .mngr2proc_data (mngr2proc_msg),
    .proc2mngr_data (proc2mngr_enq_msg),
    .c2d            (c2d),
    .d2c            (d2c)
  );

  assign imemreq_enq_msg = '{typ: MEM_READ, opaque: 8'd0, addr: imemreq_addr,
                             len: 2'd0, data: 32'd0};

  bypass_queue #(.WIDTH(MEM_REQ_BITS), .NUM_ENTRIES(2)) imemreq_queue (
    .clk     (clk),
    .reset   (reset),
    .enq_val (imemreq_enq_val),
    .enq_rdy (imemreq_enq_rdy),
    .enq_msg (imemreq_enq_msg),
    .deq_val (imemreq_val),
    .deq_rdy (imemreq_rdy),
    .deq_msg (imemreq_msg)
  );

  drop_unit #(.WIDTH(MEM_RESP_BITS)) imemresp_drop_unit (
    .clk     (clk),
    .reset   (reset),
    .drop    (imemresp_drop),
    .in_val  (imemresp_val),
    .in_rdy  (imemresp_rdy),
    .in_msg  (imemresp_msg),
    .out_val (imemresp_out_val),
    .out_rdy (imemresp_out_rdy),
    .out_msg (imemresp_out_msg)
  );

  bypass_queue #(.WIDTH(MEM_REQ_BITS), .NUM_ENTRIES(1)) dmemreq_queue (
    .clk     (clk),
    .reset   (reset),
    .enq_val (dmemreq_enq_val),
    .enq_rdy (dmemreq_enq_rdy),
    .enq_msg (dmemreq_enq_msg),
    .deq_val (dmemreq_val),
    .deq_rdy (dmemreq_rdy),
    .deq_msg (dmemreq_msg)
  );

  bypass_queue #(.WIDTH(32), .NUM_ENTRIES(1)) proc2mngr_queue (
    .clk     (clk),
    .reset   (reset),
    .enq_val (proc2mngr_enq_val),
    .enq_rdy (proc2mngr_enq_rdy),
    .enq_msg (proc2mngr_enq_msg),
    .deq_val (proc2mngr_val),
    .deq_rdy (proc2mngr_rdy),
    .deq_msg (proc2mngr_msg)
  );

endmodule
