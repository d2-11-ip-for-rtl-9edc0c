// retire_ctrl: Retirement Controller of the FTS Manager.
//
// Cores retire a finished task with a single packet holding its Picos ID,
// offered for one cycle (ret_valid). If several cores offer in the same
// cycle, or the controller is still busy, only the round-robin winner gets
// ret_ready; the others see it low and must retry (the custom instruction
// reports failure to software). The accepted packet is expanded into the
// three-packet retirement stream Picos expects: Picos ID, retiring core
// index, and a reserved zero word (last). collision pulses when more than
// one core offered in a cycle.
//
// Round-robin selection, retry and the one-to-three packet conversion
// follow the specification; the content of the second and third packets is
// assumed, since the Picos format is not given. Timing: accept in the cycle
// of the offer when idle, then three beats, one per cycle if Picos is ready.
// Bits 63:32 of picos_ret_data are always zero: Picos IDs and core indices
// are narrower than the 64-bit stream word.
module retire_ctrl
  import fts_pkg::*;
#(
  parameter int N = 30
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic      [N-1:0]    ret_valid,
  output logic      [N-1:0]    ret_ready,
  input  picos_id_t [N-1:0]    ret_id,
  output logic                 picos_ret_valid,
  input  logic                 picos_ret_ready,
  output word_t                picos_ret_data,
  output logic                 picos_ret_last,
  output logic                 collision
);
  localparam int IW = $clog2(N);

  logic [N-1:0]  gnt;
  logic [IW-1:0] gnt_idx;
  logic          any, busy;
  logic [1:0]    beat;
  picos_id_t     id_q;
  logic [IW-1:0] core_q;

  rr_arbiter #(.N(N)) u_rr (
    .clk, .rst, .req(ret_valid), .advance(!busy),
    .gnt, .gnt_idx, .any);

  assign ret_ready = busy ? '0 : gnt;
  assign collision = ($countones(ret_valid) > 1);

  assign picos_ret_valid = busy;
  assign picos_ret_last  = (beat == 2'd2);
  always_comb begin
    unique case (beat)
      2'd0:    picos_ret_data = word_t'(id_q);
      2'd1:    picos_ret_data = word_t'(core_q);
      default: picos_ret_data = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy   <= 1'b0;
      beat   <= '0;
      id_q   <= '0;
      core_q <= '0;
    end else if (!busy) begin
      if (any) begin
        busy   <= 1'b1;
        beat   <= '0;
        id_q   <= ret_id[gnt_idx];
        core_q <= gnt_idx;
      end
    end else if (picos_ret_ready) begin
      beat <= beat + 2'd1;
      if (picos_ret_last) busy <= 1'b0;
    end
  end
endmodule
