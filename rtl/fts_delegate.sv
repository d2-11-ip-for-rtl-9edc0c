// fts_delegate: per-core FTS Delegate, a RoCC accelerator.
//
// Implements the ten task-scheduling custom instructions for one core. All
// are non-blocking: each answers the cycle after it is accepted, with
// either a result or a failure value that software may retry on.
//   Initiate Task / Add Info / Send IN|OUT Dep(s): offer one packet to the
//     matching FTS Manager submission queue for one cycle; rd = 1 if taken,
//     0 if the queue was full. The two-pointer forms send rs1 and rs2 in one
//     packet.
//   Fetch SW ID: rd = SW ID of the front task of the core's ready queue
//     (not removed), 0 if the queue is empty.
//   Fetch Picos ID: rd = {valid bit at 32, Picos ID} of the front task, which
//     is removed; 0 if empty.
//   Retire Task: offers rs1[31:0] to the Retirement Controller for one cycle;
//     rd = 1 if accepted, 0 if another core won and this one must retry.
//   Ready Task Request: asks the Work-fetch Controller for one more ready
//     task; rd = 1 if the request was queued.
// The core's ready queue (READY_DEPTH entries) lives here.
//
// Instruction set and non-blocking failure replies follow the
// specification; the funct7 numbers, the result encodings and using 0 as
// "no task" (software never uses SW ID 0) are this design's own.
// Timing: cmd_ready is low while a response waits; one instruction per two
// cycles with an always-ready core. Instructions with xd = 0 send no reply.
module fts_delegate
  import fts_pkg::*;
#(
  parameter int READY_DEPTH = 2
) (
  input  logic       clk,
  input  logic       rst,
  // RoCC command
  input  logic       cmd_valid,
  output logic       cmd_ready,
  input  logic [6:0] cmd_funct7,
  input  logic [4:0] cmd_rd,
  input  logic       cmd_xd,
  input  word_t      cmd_rs1,
  input  word_t      cmd_rs2,
  // RoCC response
  output logic       resp_valid,
  input  logic       resp_ready,
  output logic [4:0] resp_rd,
  output word_t      resp_data,
  output logic       busy,
  // towards the FTS Manager
  output logic       init_valid,
  input  logic       init_ready,
  output init_t      init_data,
  output logic       info_valid,
  input  logic       info_ready,
  output word_t      info_data,
  output logic       dep_valid,
  input  logic       dep_ready,
  output dep_t       dep_data,
  output logic       wf_valid,
  input  logic       wf_ready,
  output logic       ret_valid,
  input  logic       ret_ready,
  output picos_id_t  ret_id,
  // ready tasks from the FTS Manager
  input  logic       rdy_valid,
  output logic       rdy_ready,
  input  ready_t     rdy_data
);
  localparam int RW = $bits(ready_t);

  logic          rq_valid, rq_pop;
  logic [RW-1:0] rq_raw;
  ready_t        rq_head;
  word_t         result;

  fts_fifo #(.W(RW), .DEPTH(READY_DEPTH)) u_readyq (
    .clk, .rst, .in_valid(rdy_valid), .in_ready(rdy_ready), .in_data(rdy_data),
    .out_valid(rq_valid), .out_ready(rq_pop), .out_data(rq_raw), .count());
  assign rq_head = ready_t'(rq_raw);

  assign cmd_ready = !resp_valid;
  assign busy      = resp_valid;
  wire   fire      = cmd_valid && cmd_ready;

  funct7_e fn;
  assign fn = funct7_e'(cmd_funct7);

  always_comb begin
    init_valid = 1'b0;
    info_valid = 1'b0;
    dep_valid  = 1'b0;
    wf_valid   = 1'b0;
    ret_valid  = 1'b0;
    rq_pop     = 1'b0;
    result     = '0;
    init_data  = '{sw_id: cmd_rs1, num_deps: cmd_rs2[7:0]};
    info_data  = cmd_rs1;
    dep_data   = '{dir: DEP_IN, two: 1'b0, addr1: cmd_rs2, addr0: cmd_rs1};
    ret_id     = cmd_rs1[PICOS_ID_W-1:0];
    if (fire) begin
      unique case (fn)
        FN_INIT_TASK: begin
          init_valid = 1'b1;
          result     = word_t'(init_ready);
        end
        FN_ADD_INFO: begin
          info_valid = 1'b1;
          result     = word_t'(info_ready);
        end
        FN_IN_DEP, FN_IN_DEPS, FN_OUT_DEP, FN_OUT_DEPS: begin
          dep_valid    = 1'b1;
          dep_data.dir = (fn == FN_OUT_DEP || fn == FN_OUT_DEPS) ? DEP_OUT : DEP_IN;
          dep_data.two = (fn == FN_IN_DEPS || fn == FN_OUT_DEPS);
          result       = word_t'(dep_ready);
        end
        FN_FETCH_SWID: result = rq_valid ? rq_head.sw_id : '0;
        FN_FETCH_PICOS: begin
          rq_pop = rq_valid;
          result = rq_valid ? {31'd0, 1'b1, rq_head.picos_id} : '0;
        end
        FN_RETIRE: begin
          ret_valid = 1'b1;
          result    = word_t'(ret_ready);
        end
        FN_READY_REQ: begin
          wf_valid = 1'b1;
          result   = word_t'(wf_ready);
        end
        default: result = '0;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      resp_valid <= 1'b0;
      resp_rd    <= '0;
      resp_data  <= '0;
    end else if (fire) begin
      resp_valid <= cmd_xd;
      resp_rd    <= cmd_rd;
      resp_data  <= result;
    end else if (resp_ready) begin
      resp_valid <= 1'b0;
    end
  end
endmodule
