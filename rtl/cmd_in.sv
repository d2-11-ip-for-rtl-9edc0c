// cmd_in: Command in controller of the Fast Task Scheduler IP.
//
// Walks the accelerators in round-robin order. For an accelerator that is
// not busy it reads the header word at the read pointer of that
// accelerator's command-in sub-queue. If the header's valid byte (bits
// 63:56) is 0x80 it sends the whole command to the accelerator on the
// cmdin_out AXI-Stream port (tdest = accelerator, tlast on the final word)
// and clears each slot in the queue after it is sent, so the host can
// reuse it. Command length: header, task id, parent task id, one period
// word for Execute Periodic Task, and two words per argument (argument
// count from header bits 15:8, limited to MAX_ARGS). An odd command code
// marks the accelerator busy; it is freed when the Command out controller
// reports its Finished Task (acc_free_valid/acc_free_idx).
//
// Command formats, the busy rule and the in-order processing follow the
// specification. The round-robin scan, clearing every slot (not only the
// header) and the word-by-word read/send/clear sequence are this design's
// own. Timing: 3 cycles per word plus the stream's back-pressure; an
// accelerator whose queue is empty costs 3 cycles of scan.
module cmd_in
  import fts_pkg::*;
#(
  parameter int MAX_ACCS  = 16,
  parameter int QUEUE_LEN = 64,
  parameter int MAX_ARGS  = 15
) (
  input  logic        clk,
  input  logic        rst,
  // command-in queue (BRAM port)
  output logic        q_en,
  output logic [7:0]  q_we,
  output logic [31:0] q_addr,
  output logic [63:0] q_din,
  input  logic [63:0] q_dout,
  // cmdin_out stream
  output logic [$clog2(MAX_ACCS)-1:0] tdest,
  output logic [63:0] tdata,
  output logic        tlast,
  output logic        tvalid,
  input  logic        tready,
  // accelerator freed by Command out
  input  logic        acc_free_valid,
  input  logic [$clog2(MAX_ACCS)-1:0] acc_free_idx,
  output logic [MAX_ACCS-1:0] acc_busy
);
  localparam int AI = $clog2(MAX_ACCS);
  localparam int QI = $clog2(QUEUE_LEN);
  localparam int LW = 10;  // enough for 4 + 2*255 words

  typedef enum logic [2:0] {S_SCAN, S_HDR_WAIT, S_SEND, S_RD, S_RD_WAIT} state_e;
  state_e        state;
  logic [AI-1:0] acc;
  logic [QI-1:0] rdptr [MAX_ACCS];
  logic [LW-1:0] idx, len;
  logic [7:0]    code;
  logic [63:0]   word_q;

  function automatic logic [31:0] slot_addr(logic [AI-1:0] a, logic [QI-1:0] s);
    return 32'((32'(a) * 32'(QUEUE_LEN) + 32'(s)) * 8);
  endfunction

  logic [QI-1:0] cur_slot;
  assign cur_slot = QI'(rdptr[acc] + QI'(idx));

  logic [7:0] nargs_c;
  assign nargs_c = (q_dout[15:8] > 8'(MAX_ARGS)) ? 8'(MAX_ARGS) : q_dout[15:8];

  wire hs = tvalid && tready;

  always_comb begin
    q_en   = 1'b0;
    q_we   = '0;
    q_din  = '0;
    q_addr = slot_addr(acc, cur_slot);
    unique case (state)
      S_SCAN: q_en = !acc_busy[acc];
      S_RD:   q_en = 1'b1;
      S_SEND: if (hs) begin
        q_en = 1'b1;
        q_we = 8'hFF;     // clear the slot just sent
      end
      default: ;
    endcase
  end

  assign tvalid = (state == S_SEND);
  assign tdata  = word_q;
  assign tdest  = acc;
  assign tlast  = (idx == len - 1'b1);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_SCAN;
      acc      <= '0;
      idx      <= '0;
      len      <= '0;
      code     <= '0;
      word_q   <= '0;
      acc_busy <= '0;
      for (int a = 0; a < MAX_ACCS; a++) rdptr[a] <= '0;
    end else begin
      unique case (state)
        S_SCAN: begin
          if (!acc_busy[acc]) state <= S_HDR_WAIT;
          else acc <= AI'((32'(acc) + 1) % MAX_ACCS);
        end
        S_HDR_WAIT: begin
          if (q_dout[63:56] == ENTRY_VALID) begin
            word_q <= q_dout;
            code   <= q_dout[7:0];
            len    <= LW'(cmd_words(q_dout[7:0], nargs_c));
            state  <= S_SEND;
          end else begin
            acc   <= AI'((32'(acc) + 1) % MAX_ACCS);
            state <= S_SCAN;
          end
        end
        S_SEND: if (hs) begin
          if (tlast) begin
            if (code[0]) acc_busy[acc] <= 1'b1;
            rdptr[acc] <= QI'(rdptr[acc] + QI'(len));
            idx   <= '0;
            acc   <= AI'((32'(acc) + 1) % MAX_ACCS);
            state <= S_SCAN;
          end else begin
            idx   <= idx + 1'b1;
            state <= S_RD;
          end
        end
        S_RD:      state <= S_RD_WAIT;
        S_RD_WAIT: begin
          word_q <= q_dout;
          state  <= S_SEND;
        end
        default: state <= S_SCAN;
      endcase
      // a Finished Task is always more recent than the command that set busy
      if (acc_free_valid) acc_busy[acc_free_idx] <= 1'b0;
    end
  end
endmodule
