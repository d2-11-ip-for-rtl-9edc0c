// core_sub_handler: one core's Core Submission Handler.
//
// A core submits a task as three kinds of elementary packets, each arriving
// on its own queue: Initiate Task (SW ID and dependence count), Add Info
// (one metadata word) and dependences (one or two IN or OUT pointers per
// entry). The handler buffers each queue in a small FIFO. When an Initiate
// Task entry is at the front it raises a submission request whose length is
// the number of beats the task needs (3 + dependences). Once the Guided
// Arbiter selects it (sel pulse) it emits, in order: a header beat with the
// dependence count, the SW ID, the Add Info word and one beat per
// dependence pointer, marking the final beat with out_last. The request is
// dropped while it sends, so a core can never own two slots.
//
// The queue structure and the length-carrying request follow the
// specification. The beat order, the rule that every task carries exactly
// one Add Info word, and the FIFO depth (SUBQ_DEPTH) are this design's own.
// Timing: sel is honoured the cycle after the request; one beat per cycle
// after that while out_ready is high and the needed queue is not empty.
module core_sub_handler
  import fts_pkg::*;
#(
  parameter int SUBQ_DEPTH = 4
) (
  input  logic      clk,
  input  logic      rst,
  // elementary submission queues from the core
  input  logic      init_valid,
  output logic      init_ready,
  input  init_t     init_data,
  input  logic      info_valid,
  output logic      info_ready,
  input  word_t     info_data,
  input  logic      dep_valid,
  output logic      dep_ready,
  input  dep_t      dep_data,
  // submission request to the arbiters
  output logic                 req_valid,
  output logic [SEQ_LEN_W-1:0] req_len,
  input  logic                 sel,
  // submission beats
  output logic      out_valid,
  input  logic      out_ready,
  output sub_beat_t out_beat,
  output logic      out_last
);
  localparam int IW = $bits(init_t);
  localparam int DW = $bits(dep_t);

  logic          iq_v, iq_pop;
  logic [IW-1:0] iq_d;
  logic          nq_v, nq_pop;
  word_t         nq_d;
  logic          dq_v, dq_pop;
  logic [DW-1:0] dq_d;
  init_t         ini;
  dep_t          dep;

  fts_fifo #(.W(IW), .DEPTH(SUBQ_DEPTH)) u_iq (
    .clk, .rst, .in_valid(init_valid), .in_ready(init_ready), .in_data(init_data),
    .out_valid(iq_v), .out_ready(iq_pop), .out_data(iq_d), .count());
  fts_fifo #(.W(XLEN), .DEPTH(SUBQ_DEPTH)) u_nq (
    .clk, .rst, .in_valid(info_valid), .in_ready(info_ready), .in_data(info_data),
    .out_valid(nq_v), .out_ready(nq_pop), .out_data(nq_d), .count());
  fts_fifo #(.W(DW), .DEPTH(SUBQ_DEPTH)) u_dq (
    .clk, .rst, .in_valid(dep_valid), .in_ready(dep_ready), .in_data(dep_data),
    .out_valid(dq_v), .out_ready(dq_pop), .out_data(dq_d), .count());

  assign ini = init_t'(iq_d);
  assign dep = dep_t'(dq_d);

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_SWID, S_INFO_DEPS} state_e;
  state_e     state;
  logic       in_deps;     // INFO sent, now sending dependences
  logic [7:0] deps_left;
  logic       half;        // second pointer of a two-pointer entry is next

  // clamp the dependence count to what one sequence can carry
  logic [7:0] ndeps;
  assign ndeps = (ini.num_deps > 8'(MAX_DEPS)) ? 8'(MAX_DEPS) : ini.num_deps;

  assign req_valid = (state == S_IDLE) && iq_v;
  assign req_len   = SEQ_LEN_W'(3 + 32'(ndeps));

  wire fire = out_valid && out_ready;

  always_comb begin
    out_valid = 1'b0;
    out_beat  = '{kind: BEAT_HDR, data: '0};
    out_last  = 1'b0;
    iq_pop    = 1'b0;
    nq_pop    = 1'b0;
    dq_pop    = 1'b0;
    unique case (state)
      S_HDR: begin
        out_valid = 1'b1;
        out_beat  = '{kind: BEAT_HDR, data: word_t'(ndeps)};
      end
      S_SWID: begin
        out_valid = 1'b1;
        out_beat  = '{kind: BEAT_SWID, data: ini.sw_id};
      end
      S_INFO_DEPS: begin
        if (!in_deps) begin
          out_valid = nq_v;
          out_beat  = '{kind: BEAT_INFO, data: nq_d};
          out_last  = (ndeps == 8'd0);
          nq_pop    = fire;
        end else begin
          out_valid = dq_v;
          out_beat.kind = (dep.dir == DEP_OUT) ? BEAT_DEP_OUT : BEAT_DEP_IN;
          out_beat.data = half ? dep.addr1 : dep.addr0;
          out_last  = (deps_left == 8'd1);
          dq_pop    = fire && (!dep.two || half || deps_left == 8'd1);
        end
        iq_pop = fire && out_last;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      in_deps   <= 1'b0;
      deps_left <= '0;
      half      <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (sel && req_valid) state <= S_HDR;
        S_HDR:  if (fire) state <= S_SWID;
        S_SWID: if (fire) begin
          state     <= S_INFO_DEPS;
          in_deps   <= 1'b0;
          deps_left <= ndeps;
          half      <= 1'b0;
        end
        S_INFO_DEPS: if (fire) begin
          if (out_last) begin
            state <= S_IDLE;
          end else if (!in_deps) begin
            in_deps <= 1'b1;
          end else begin
            deps_left <= deps_left - 8'd1;
            half      <= dq_pop ? 1'b0 : 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
