// cmd_queue_bram: command-in or command-out circular queue memory.
//
// WORDS 64-bit words (default 16 accelerators x 64 slots = 1024), split
// into one sub-queue per accelerator: accelerator a owns words
// [a*QUEUE_LEN, a*QUEUE_LEN + QUEUE_LEN - 1]. Two independent ports with
// the signals of a Xilinx-style BRAM port: en, 8 byte write enables,
// 32-bit byte address, din and dout. Port A serves the scheduler, port B
// the host. Reads have one cycle of latency; a write updates only the
// enabled bytes. Both ports writing the same word in one cycle is not
// allowed (port B then wins).
//
// Size and layout follow the specification; byte addressing and read
// latency are assumed.
module cmd_queue_bram #(
  parameter int WORDS = 1024
) (
  input  logic        clk,
  input  logic        a_en,
  input  logic [7:0]  a_we,
  input  logic [31:0] a_addr,
  input  logic [63:0] a_din,
  output logic [63:0] a_dout,
  input  logic        b_en,
  input  logic [7:0]  b_we,
  input  logic [31:0] b_addr,
  input  logic [63:0] b_din,
  output logic [63:0] b_dout
);
  localparam int AW = $clog2(WORDS);

  logic [63:0] mem [WORDS];

  wire [AW-1:0] a_idx = a_addr[AW+2:3];
  wire [AW-1:0] b_idx = b_addr[AW+2:3];

  always_ff @(posedge clk) begin
    if (a_en) begin
      for (int i = 0; i < 8; i++)
        if (a_we[i]) mem[a_idx][i*8 +: 8] <= a_din[i*8 +: 8];
      a_dout <= mem[a_idx];
    end
    if (b_en) begin
      for (int i = 0; i < 8; i++)
        if (b_we[i]) mem[b_idx][i*8 +: 8] <= b_din[i*8 +: 8];
      b_dout <= mem[b_idx];
    end
  end
endmodule
