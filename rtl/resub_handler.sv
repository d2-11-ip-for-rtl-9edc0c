// resub_handler: Resubmission Handler between the Guided Arbiter and Picos.
//
// Every beat of a submission sequence is passed to Picos and copied into a
// buffer of MAX_SEQ entries. After the last beat the handler stops taking
// input and waits for Picos' answer (resp_valid). An acknowledgement frees
// it for the next sequence. A negative acknowledgement, which Picos gives
// when it has no room for another in-flight task, makes the handler replay
// the buffered sequence from its first beat and wait again; this repeats
// until Picos accepts. resubmit pulses once per replay.
//
// Replay on negative acknowledgement follows the specification; the
// response handshake (one-cycle resp_valid with resp_nack) is assumed, as
// the Picos interface is not given. Timing: pass-through is combinational,
// one beat per cycle; a replay starts the cycle after the answer.
module resub_handler
  import fts_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      in_valid,
  output logic      in_ready,
  input  sub_beat_t in_beat,
  input  logic      in_last,
  output logic      out_valid,
  input  logic      out_ready,
  output sub_beat_t out_beat,
  output logic      out_last,
  input  logic      resp_valid,
  input  logic      resp_nack,
  output logic      resubmit
);
  localparam int BW = $clog2(MAX_SEQ);

  typedef enum logic [1:0] {S_PASS, S_WAIT, S_REPLAY} state_e;
  state_e    state;
  sub_beat_t buf_q [MAX_SEQ];
  logic [BW-1:0] wr, rd, last_idx;

  always_comb begin
    in_ready  = 1'b0;
    out_valid = 1'b0;
    out_beat  = in_beat;
    out_last  = in_last;
    unique case (state)
      S_PASS: begin
        out_valid = in_valid;
        in_ready  = out_ready;
      end
      S_REPLAY: begin
        out_valid = 1'b1;
        out_beat  = buf_q[rd];
        out_last  = (rd == last_idx);
      end
      default: ;
    endcase
  end

  assign resubmit = (state == S_WAIT) && resp_valid && resp_nack;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_PASS;
      wr       <= '0;
      rd       <= '0;
      last_idx <= '0;
    end else begin
      unique case (state)
        S_PASS: if (in_valid && in_ready) begin
          buf_q[wr] <= in_beat;
          if (in_last) begin
            last_idx <= wr;
            wr       <= '0;
            state    <= S_WAIT;
          end else if (32'(wr) < MAX_SEQ - 1) begin
            wr <= wr + 1'b1;
          end
        end
        S_WAIT: if (resp_valid) begin
          if (resp_nack) begin
            rd    <= '0;
            state <= S_REPLAY;
          end else begin
            state <= S_PASS;
          end
        end
        S_REPLAY: if (out_ready) begin
          if (out_last) state <= S_WAIT;
          else          rd    <= rd + 1'b1;
        end
        default: state <= S_PASS;
      endcase
    end
  end
endmodule
