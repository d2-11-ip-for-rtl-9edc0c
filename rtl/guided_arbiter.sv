// guided_arbiter: forwards one whole submission sequence at a time.
//
// The Round Robin Arbiter offers the index of a requesting core together
// with that core's sequence length. The Guided Arbiter accepts the offer
// (sel_accept, also sent back to the chosen core as its sel pulse), then
// connects that core's beat stream to its single output for exactly the
// announced number of beats, and only then accepts another offer. Beats of
// two submissions therefore never interleave, which Picos requires.
// out_last marks the final beat, counted here, not taken from the core.
//
// Behaviour follows the specification; the counter-based framing is this
// design's own. Timing: the offer is accepted in the cycle it is made when
// idle; beats pass combinationally (valid/ready) one per cycle.
module guided_arbiter
  import fts_pkg::*;
#(
  parameter int N = 4
) (
  input  logic                 clk,
  input  logic                 rst,
  // offer from the round-robin arbiter
  input  logic                 offer_valid,
  input  logic [$clog2(N)-1:0] offer_idx,
  input  logic [SEQ_LEN_W-1:0] offer_len,
  output logic                 sel_accept,
  // beats from every core
  input  logic      [N-1:0]    in_valid,
  output logic      [N-1:0]    in_ready,
  input  sub_beat_t [N-1:0]    in_beat,
  // forwarded sequence
  output logic      out_valid,
  input  logic      out_ready,
  output sub_beat_t out_beat,
  output logic      out_last
);
  logic                 busy;
  logic [$clog2(N)-1:0] cur;
  logic [SEQ_LEN_W-1:0] left;

  assign sel_accept = !busy && offer_valid;

  always_comb begin
    in_ready  = '0;
    out_valid = busy && in_valid[cur];
    out_beat  = in_beat[cur];
    out_last  = busy && (left == SEQ_LEN_W'(1));
    if (busy) in_ready[cur] = out_ready;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      cur  <= '0;
      left <= '0;
    end else if (!busy) begin
      if (offer_valid) begin
        busy <= 1'b1;
        cur  <= offer_idx;
        left <= offer_len;
      end
    end else if (out_valid && out_ready) begin
      left <= left - 1'b1;
      if (out_last) busy <= 1'b0;
    end
  end
endmodule
