// fts_fifo: small synchronous FIFO with valid/ready on both sides.
//
// DEPTH entries of W bits held in a register array; the front entry is
// shown combinationally on out_data. Push and pop may happen in the same
// cycle. in_ready is low only when the FIFO is full. Synchronous,
// active-high reset empties it. DEPTH must be a power of two.
module fts_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic [$clog2(DEPTH):0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH) + 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  assign in_ready  = (count != ($clog2(DEPTH)+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rp];

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0;
      rp <= '0;
      count <= '0;
    end else begin
      if (push) begin
        mem[wp] <= in_data;
        wp <= (DEPTH > 1) ? AW'(wp + 1'b1) : '0;
      end
      if (pop) rp <= (DEPTH > 1) ? AW'(rp + 1'b1) : '0;
      count <= count + CW'(push) - CW'(pop);
    end
  end
endmodule
