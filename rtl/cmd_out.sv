// cmd_out: Command out controller of the Fast Task Scheduler IP.
//
// Takes commands from the accelerators on the cmdout_in AXI-Stream port
// (tid = source accelerator). Each command is two words: a header (code in
// bits 7:0, 0x03 for Finished Task) and the task identifier. It then polls
// the header slot at the write pointer of that accelerator's command-out
// sub-queue until the host has released it (valid byte not 0x80), writes
// the task identifier into the second slot and finally the header with its
// valid byte set to 0x80, so the host never sees a half-written command.
// For a Finished Task it then pulses acc_free so Command in may send that
// accelerator its next task.
//
// Command formats and the notification of Command in follow the
// specification. The two-word framing (the port carries no tlast), the
// wait for a free slot and the write order are this design's own.
// Timing: 2 cycles to take the command, at least 2 to check the slot,
// 2 to write; tready is low meanwhile.
module cmd_out
  import fts_pkg::*;
#(
  parameter int MAX_ACCS  = 16,
  parameter int QUEUE_LEN = 64
) (
  input  logic        clk,
  input  logic        rst,
  // cmdout_in stream
  input  logic [$clog2(MAX_ACCS)-1:0] tid,
  input  logic [63:0] tdata,
  input  logic        tvalid,
  output logic        tready,
  // command-out queue (BRAM port)
  output logic        q_en,
  output logic [7:0]  q_we,
  output logic [31:0] q_addr,
  output logic [63:0] q_din,
  input  logic [63:0] q_dout,
  // accelerator freed
  output logic        acc_free_valid,
  output logic [$clog2(MAX_ACCS)-1:0] acc_free_idx
);
  localparam int AI = $clog2(MAX_ACCS);
  localparam int QI = $clog2(QUEUE_LEN);

  typedef enum logic [2:0] {S_HDR, S_ID, S_CHK, S_CHK_WAIT, S_WR_ID, S_WR_HDR} state_e;
  state_e        state;
  logic [AI-1:0] acc;
  logic [63:0]   hdr, tsk;
  logic [QI-1:0] wrptr [MAX_ACCS];

  function automatic logic [31:0] slot_addr(logic [AI-1:0] a, logic [QI-1:0] s);
    return 32'((32'(a) * 32'(QUEUE_LEN) + 32'(s)) * 8);
  endfunction

  assign tready = (state == S_HDR) || (state == S_ID);

  always_comb begin
    q_en   = 1'b0;
    q_we   = '0;
    q_din  = '0;
    q_addr = slot_addr(acc, wrptr[acc]);
    unique case (state)
      S_CHK: q_en = 1'b1;
      S_WR_ID: begin
        q_en   = 1'b1;
        q_we   = 8'hFF;
        q_din  = tsk;
        q_addr = slot_addr(acc, QI'(wrptr[acc] + 1'b1));
      end
      S_WR_HDR: begin
        q_en  = 1'b1;
        q_we  = 8'hFF;
        q_din = {ENTRY_VALID, hdr[55:0]};
      end
      default: ;
    endcase
  end

  assign acc_free_valid = (state == S_WR_HDR) && (hdr[7:0] == CMD_FINISHED);
  assign acc_free_idx   = acc;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_HDR;
      acc   <= '0;
      hdr   <= '0;
      tsk   <= '0;
      for (int a = 0; a < MAX_ACCS; a++) wrptr[a] <= '0;
    end else begin
      unique case (state)
        S_HDR: if (tvalid) begin
          hdr   <= tdata;
          acc   <= tid;
          state <= S_ID;
        end
        S_ID: if (tvalid) begin
          tsk   <= tdata;
          state <= S_CHK;
        end
        S_CHK:      state <= S_CHK_WAIT;
        S_CHK_WAIT: state <= (q_dout[63:56] == ENTRY_VALID) ? S_CHK : S_WR_ID;
        S_WR_ID:    state <= S_WR_HDR;
        S_WR_HDR: begin
          wrptr[acc] <= QI'(wrptr[acc] + 2'd2);
          state      <= S_HDR;
        end
        default: state <= S_HDR;
      endcase
    end
  end
endmodule
