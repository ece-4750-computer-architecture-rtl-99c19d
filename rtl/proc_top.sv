// proc_top: the two pipelined PARCv2 processors side by side.
//
// base_proc is the baseline five-stage pipeline that resolves data hazards
// by stalling in decode; alt_proc is the alternative five-stage pipeline
// that forwards results from the ends of X, M and W to decode and stalls
// only on a load-use dependence. Both run the same programs and have the
// same six val/rdy channels (test source, test sink, instruction request
// and response, data request and response), brought out here with the
// prefixes base_ and alt_. They share the clock and the synchronous,
// active-high reset and are otherwise independent, so each can be
// attached to its own memory and test harness and the two compared cycle
// for cycle. The top adds no logic and no latency of its own. Both
// pipelines and their interfaces follow the description; placing them in
// one top with prefixed ports is this design's choice.
module proc_top
  import mem_msg_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic [31:0] base_mngr2proc_msg,
  input  logic        base_mngr2proc_val,
  output logic        base_mngr2proc_rdy,
  output logic [31:0] base_proc2mngr_msg,
  output logic        base_proc2mngr_val,
  input  logic        base_proc2mngr_rdy,
  output mem_req_t    base_imemreq_msg,
  output logic        base_imemreq_val,
  input  logic        base_imemreq_rdy,
  input  mem_resp_t   base_imemresp_msg,
  input  logic        base_imemresp_val,
  output logic        base_imemresp_rdy,
  output mem_req_t    base_dmemreq_msg,
  output logic        base_dmemreq_val,
  input  logic        base_dmemreq_rdy,
  input  mem_resp_t   base_dmemresp_msg,
  input  logic        base_dmemresp_val,
  output logic        base_dmemresp_rdy,
  input  logic [31:0] alt_mngr2proc_msg,
  input  logic        alt_mngr2proc_val,
  output logic        alt_mngr2proc_rdy,
  output logic [31:0] alt_proc2mngr_msg,
  output logic        alt_proc2mngr_val,
  input  logic        alt_proc2mngr_rdy,
  output mem_req_t    alt_imemreq_msg,
  output logic        alt_imemreq_val,
  input  logic        alt_imemreq_rdy,
  input  mem_resp_t   alt_imemresp_msg,
  input  logic        alt_imemresp_val,
  output logic        alt_imemresp_rdy,
  output mem_req_t    alt_dmemreq_msg,
  output logic        alt_dmemreq_val,
  input  logic        alt_dmemreq_rdy,
  input  mem_resp_t   alt_dmemresp_msg,
  input  logic        alt_dmemresp_val,
  output logic        alt_dmemresp_rdy
);

  proc #(.BYPASS(1'b0)) base_proc (
    .clk   (clk),
    .reset (reset),
    .mngr2proc_msg (base_mngr2proc_msg),
    .mngr2proc_val (base_mngr2proc_val),
    .mngr2proc_rdy (base_mngr2proc_rdy),
    .proc2mngr_msg (base_proc2mngr_msg),
    .proc2mngr_val (base_proc2mngr_val),
    .proc2mngr_rdy (base_proc2mngr_rdy),
    .imemreq_msg (base_imemreq_msg),
    .imemreq_val (base_imemreq_val),
    .imemreq_rdy (base_imemreq_rdy),
    .imemresp_msg (base_imemresp_msg),
    .imemresp_val (base_imemresp_val),
    .imemresp_rdy (base_imemresp_rdy),
    .dmemreq_msg (base_dmemreq_msg),
    .dmemreq_val (base_dmemreq_val),
    .dmemreq_rdy (base_dmemreq_rdy),
    .dmemresp_msg (base_dmemresp_msg),
    .dmemresp_val (base_dmemresp_val),
    .dmemresp_rdy (base_dmemresp_rdy)
  );

  proc #(.BYPASS(1'b1)) alt_proc (
    .clk   (clk),
    .reset (reset),
    .mngr2proc_msg (alt_mngr2proc_msg),
    .mngr2proc_val (alt_mngr2proc_val),
    .mngr2proc_rdy (alt_mngr2proc_rdy),
    .proc2mngr_msg (alt_proc2mngr_msg),
    .proc2mngr_val (alt_proc2mngr_val),
    .proc2mngr_rdy (alt_proc2mngr_rdy),
    .imemreq_msg (alt_imemreq_msg),
    .imemreq_val (alt_imemreq_val),
    .imemreq_rdy (alt_imemreq_rdy),
    .imemresp_msg (alt_imemresp_msg),
    .imemresp_val (alt_imemresp_val),
    .imemresp_rdy (alt_imemresp_rdy),
    .dmemreq_msg (alt_dmemreq_msg),
    .dmemreq_val (alt_dmemreq_val),
    .dmemreq_rdy (alt_dmemreq_rdy),
    .dmemresp_msg (alt_dmemresp_msg),
    .dmemresp_val (alt_dmemresp_val),
    .dmemresp_rdy (alt_dmemresp_rdy)
  );

endmodule
