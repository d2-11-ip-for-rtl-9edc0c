// acc_model: behavioural stand-in for one task accelerator.
//
// Takes command words on its input stream (random back-pressure). After
// the word with tlast it waits EXEC_CYCLES and then sends a two-word
// Finished Task command: header {0x80, ..., code 0x03} and the task
// identifier it found in the second word of the command. Counts commands
// and words received. Only for tests.
module acc_model #(
  parameter int EXEC_CYCLES = 20
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_tvalid,
  output logic        in_tready,
  input  logic [63:0] in_tdata,
  input  logic        in_tlast,
  output logic        out_tvalid,
  input  logic        out_tready,
  output logic [63:0] out_tdata,
  output logic        out_tlast,
  output int          n_cmds,
  output int          n_words
);
  int          widx, wait_cnt;
  logic        obeat;
  logic [63:0] task_id;
  logic        running, sending;

  assign out_tvalid = sending;
  assign out_tdata  = !obeat ? 64'h8000_0000_0000_0003 : task_id;
  assign out_tlast  = obeat;

  always @(posedge clk) begin
    if (rst) begin
      in_tready <= 1'b0; widx = 0; running <= 1'b0; sending <= 1'b0; obeat <= 1'b0;
      n_cmds <= 0; n_words <= 0; wait_cnt = 0; task_id <= '0;
    end else begin
      in_tready <= !running && !sending && ($urandom_range(0, 3) != 0);
      if (in_tvalid && in_tready) begin
        n_words <= n_words + 1;
        if (widx == 1) task_id <= in_tdata;
        widx++;
        if (in_tlast) begin
          widx = 0;
          running <= 1'b1;
          wait_cnt = EXEC_CYCLES;
          n_cmds <= n_cmds + 1;
          in_tready <= 1'b0;
        end
      end
      if (running) begin
        if (wait_cnt == 0) begin running <= 1'b0; sending <= 1'b1; obeat <= 1'b0; end
        else wait_cnt--;
      end
      if (sending && out_tready) begin
        if (obeat) sending <= 1'b0;
        obeat <= !obeat;
      end
    end
  end
endmodule
