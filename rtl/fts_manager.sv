// fts_manager: FTS Manager, the single shared link between cores and Picos.
//
// Converts between the per-core queues driven by the FTS Delegates and the
// queues of the Picos dependence manager, so only this block depends on
// Picos' interface. Per core it offers three submission queues (Initiate
// Task, Add Info, dependences), a work-fetch request queue, a retirement
// queue and a ready queue; towards Picos it has one submission, one ready
// and one retirement queue. Inside are the three controllers: Submission
// (atomic, non-interleaved submissions with replay on negative
// acknowledgement), Work-fetch (ready tasks handed out in request order)
// and Retirement (round-robin, losers retry, 1-to-3 packet conversion).
//
// Structure follows the specification; the packet formats towards Picos
// are assumed. Timing is that of the three controllers.
module fts_manager
  import fts_pkg::*;
#(
  parameter int N           = 30,
  parameter int SUBQ_DEPTH  = 4,
  parameter int ORDER_DEPTH = 64
) (
  input  logic      clk,
  input  logic      rst,
  // per-core side
  input  logic      [N-1:0] init_valid,
  output logic      [N-1:0] init_ready,
  input  init_t     [N-1:0] init_data,
  input  logic      [N-1:0] info_valid,
  output logic      [N-1:0] info_ready,
  input  word_t     [N-1:0] info_data,
  input  logic      [N-1:0] dep_valid,
  output logic      [N-1:0] dep_ready,
  input  dep_t      [N-1:0] dep_data,
  input  logic      [N-1:0] wf_valid,
  output logic      [N-1:0] wf_ready,
  input  logic      [N-1:0] ret_valid,
  output logic      [N-1:0] ret_ready,
  input  picos_id_t [N-1:0] ret_id,
  output logic      [N-1:0] rdy_valid,
  input  logic      [N-1:0] rdy_ready,
  output ready_t            rdy_data,
  // Picos side
  output logic      picos_sub_valid,
  input  logic      picos_sub_ready,
  output sub_beat_t picos_sub_beat,
  output logic      picos_sub_last,
  input  logic      picos_sub_resp_valid,
  input  logic      picos_sub_resp_nack,
  input  logic      picos_rdy_valid,
  output logic      picos_rdy_ready,
  input  ready_t    picos_rdy_data,
  output logic      picos_ret_valid,
  input  logic      picos_ret_ready,
  output word_t     picos_ret_data,
  output logic      picos_ret_last,
  // event pulses
  output logic      resubmit,
  output logic      ret_collision
);
  submission_ctrl #(.N(N), .SUBQ_DEPTH(SUBQ_DEPTH)) u_sub (
    .clk, .rst,
    .init_valid, .init_ready, .init_data,
    .info_valid, .info_ready, .info_data,
    .dep_valid, .dep_ready, .dep_data,
    .picos_sub_valid, .picos_sub_ready, .picos_sub_beat, .picos_sub_last,
    .picos_sub_resp_valid, .picos_sub_resp_nack, .resubmit);

  workfetch_ctrl #(.N(N), .ORDER_DEPTH(ORDER_DEPTH)) u_wf (
    .clk, .rst, .wf_valid, .wf_ready, .rdy_valid, .rdy_ready, .rdy_data,
    .picos_rdy_valid, .picos_rdy_ready, .picos_rdy_data);

  retire_ctrl #(.N(N)) u_ret (
    .clk, .rst, .ret_valid, .ret_ready, .ret_id,
    .picos_ret_valid, .picos_ret_ready, .picos_ret_data, .picos_ret_last,
    .collision(ret_collision));
endmodule
