// rr_arbiter: round-robin arbiter over N requesters.
//
// The requester at or after the priority pointer wins; the grant is
// combinational (one-hot gnt plus its index gnt_idx). When the caller
// accepts the grant (advance high) the pointer moves to the requester just
// after the winner, so every requester is served within N grants. The
// Submission, Work-fetch and Retirement Controllers all use it. Pointer
// resets to requester 0.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         gnt,
  output logic [$clog2(N)-1:0] gnt_idx,
  output logic                 any
);
  localparam int IW = $clog2(N);
  logic [IW-1:0] ptr;

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    any     = 1'b0;
    for (int k = 0; k < N; k++) begin
      int unsigned idx;
      idx = (32'(ptr) + 32'(k)) % 32'(N);
      if (!any && req[idx]) begin
        any      = 1'b1;
        gnt_idx  = IW'(idx);
      end
    end
    if (any) gnt[gnt_idx] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) ptr <= '0;
    else if (advance && any)
      ptr <= (32'(gnt_idx) == 32'(N - 1)) ? '0 : IW'(gnt_idx + 1'b1);
  end
endmodule
