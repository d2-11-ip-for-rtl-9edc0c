// submission_ctrl: Submission Controller of the FTS Manager.
//
// Makes task submissions from N cores reach Picos atomically. Each core has
// a Core Submission Handler fed by its three elementary submission queues.
// Handlers with a complete task pending raise a request carrying the
// sequence length; the Round Robin Arbiter picks one, the Guided Arbiter
// accepts it and forwards exactly that many beats from that core, and the
// Resubmission Handler passes them to Picos, replaying the sequence if Picos
// answers with a negative acknowledgement.
//
// Structure follows the specification's block diagram of the controller.
// Timing: a request is granted in the cycle it is seen while the Guided
// Arbiter is idle; beats then flow one per cycle.
module submission_ctrl
  import fts_pkg::*;
#(
  parameter int N          = 30,
  parameter int SUBQ_DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst,
  // per-core elementary submission queues
  input  logic  [N-1:0] init_valid,
  output logic  [N-1:0] init_ready,
  input  init_t [N-1:0] init_data,
  input  logic  [N-1:0] info_valid,
  output logic  [N-1:0] info_ready,
  input  word_t [N-1:0] info_data,
  input  logic  [N-1:0] dep_valid,
  output logic  [N-1:0] dep_ready,
  input  dep_t  [N-1:0] dep_data,
  // submission queue to Picos
  output logic      picos_sub_valid,
  input  logic      picos_sub_ready,
  output sub_beat_t picos_sub_beat,
  output logic      picos_sub_last,
  input  logic      picos_sub_resp_valid,
  input  logic      picos_sub_resp_nack,
  output logic      resubmit
);
  localparam int IW = $clog2(N);

  logic      [N-1:0]                req_valid;
  logic      [SEQ_LEN_W-1:0]        req_len [N];
  logic      [N-1:0]                sel;
  logic      [N-1:0]                b_valid, b_ready;
  sub_beat_t [N-1:0]                b_beat;
  logic      [N-1:0]                b_last_unused;

  logic          rr_any, accept;
  logic [IW-1:0] rr_idx;
  logic [N-1:0]  rr_gnt_unused;

  logic      g_valid, g_ready, g_last;
  sub_beat_t g_beat;

  for (genvar i = 0; i < N; i++) begin : g_core
    core_sub_handler #(.SUBQ_DEPTH(SUBQ_DEPTH)) u_csh (
      .clk, .rst,
      .init_valid(init_valid[i]), .init_ready(init_ready[i]), .init_data(init_data[i]),
      .info_valid(info_valid[i]), .info_ready(info_ready[i]), .info_data(info_data[i]),
      .dep_valid(dep_valid[i]),   .dep_ready(dep_ready[i]),   .dep_data(dep_data[i]),
      .req_valid(req_valid[i]), .req_len(req_len[i]), .sel(sel[i]),
      .out_valid(b_valid[i]), .out_ready(b_ready[i]), .out_beat(b_beat[i]),
      .out_last(b_last_unused[i]));
    assign sel[i] = accept && (rr_idx == IW'(i));
  end

  rr_arbiter #(.N(N)) u_rr (
    .clk, .rst, .req(req_valid), .advance(accept),
    .gnt(rr_gnt_unused), .gnt_idx(rr_idx), .any(rr_any));

  guided_arbiter #(.N(N)) u_ga (
    .clk, .rst,
    .offer_valid(rr_any), .offer_idx(rr_idx), .offer_len(req_len[rr_idx]),
    .sel_accept(accept),
    .in_valid(b_valid), .in_ready(b_ready), .in_beat(b_beat),
    .out_valid(g_valid), .out_ready(g_ready), .out_beat(g_beat), .out_last(g_last));

  resub_handler u_rs (
    .clk, .rst,
    .in_valid(g_valid), .in_ready(g_ready), .in_beat(g_beat), .in_last(g_last),
    .out_valid(picos_sub_valid), .out_ready(picos_sub_ready),
    .out_beat(picos_sub_beat), .out_last(picos_sub_last),
    .resp_valid(picos_sub_resp_valid), .resp_nack(picos_sub_resp_nack),
    .resubmit);
endmodule
