// workfetch_ctrl: Work-fetch Controller of the FTS Manager.
//
// Ready tasks sit in the single global ready queue of Picos. Each core asks
// for one more ready task through its work-fetch request queue; the
// controller accepts at most one request per cycle (round robin among
// simultaneous requesters) and records the requesting core in an order
// FIFO. The ready task at the head of Picos' queue always goes to the core
// at the head of the order FIFO, so tasks are handed out in the total order
// of the requests. A transfer waits until that core's ready queue has room.
//
// The in-order distribution follows the specification; round-robin
// tie-breaking of same-cycle requests and ORDER_DEPTH are this design's
// own. Timing: request accepted in one cycle, delivery combinational from
// Picos' ready queue to the core's ready queue, one task per cycle.
module workfetch_ctrl
  import fts_pkg::*;
#(
  parameter int N           = 30,
  parameter int ORDER_DEPTH = 64
) (
  input  logic   clk,
  input  logic   rst,
  // per-core work-fetch requests
  input  logic   [N-1:0] wf_valid,
  output logic   [N-1:0] wf_ready,
  // per-core ready queues
  output logic   [N-1:0] rdy_valid,
  input  logic   [N-1:0] rdy_ready,
  output ready_t         rdy_data,
  // global ready queue from Picos
  input  logic   picos_rdy_valid,
  output logic   picos_rdy_ready,
  input  ready_t picos_rdy_data
);
  localparam int IW = $clog2(N);

  logic [N-1:0]  gnt;
  logic [IW-1:0] gnt_idx;
  logic          any, ord_in_ready, ord_valid, ord_pop;
  logic [IW-1:0] head;

  rr_arbiter #(.N(N)) u_rr (
    .clk, .rst, .req(wf_valid), .advance(any && ord_in_ready),
    .gnt, .gnt_idx, .any);

  assign wf_ready = ord_in_ready ? gnt : '0;

  fts_fifo #(.W(IW), .DEPTH(ORDER_DEPTH)) u_order (
    .clk, .rst, .in_valid(any), .in_ready(ord_in_ready), .in_data(gnt_idx),
    .out_valid(ord_valid), .out_ready(ord_pop), .out_data(head), .count());

  always_comb begin
    rdy_valid = '0;
    if (ord_valid && picos_rdy_valid) rdy_valid[head] = 1'b1;
  end
  assign rdy_data        = picos_rdy_data;
  assign ord_pop         = ord_valid && picos_rdy_valid && rdy_ready[head];
  assign picos_rdy_ready = ord_pop;
endmodule
