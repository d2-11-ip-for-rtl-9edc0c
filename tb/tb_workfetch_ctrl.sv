// tb_workfetch_ctrl: cores request ready tasks in a known order (some in
// the same cycle), then Picos releases numbered ready tasks. Checks that
// the k-th task goes to the k-th accepted request, that a core whose ready
// queue is full stalls delivery without reordering, and that requests are
// refused when nothing is pending beyond order-FIFO capacity.
module tb_workfetch_ctrl;
  import fts_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst = 1;
  logic [N-1:0] wf_valid, wf_ready, rdy_valid, rdy_ready;
  ready_t rdy_data, picos_rdy_data;
  logic picos_rdy_valid, picos_rdy_ready;
  int checks = 0, failures = 0;
  int order[$];
  int next_task = 0, delivered = 0;

  workfetch_ctrl #(.N(N), .ORDER_DEPTH(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // record accepted requests in acceptance order
  always @(posedge clk)
    if (!rst) for (int i = 0; i < N; i++) if (wf_valid[i] && wf_ready[i]) order.push_back(i);

  // deliveries
  always @(posedge clk)
    if (!rst) for (int i = 0; i < N; i++)
      if (rdy_valid[i] && rdy_ready[i]) begin
        int exp_core;
        exp_core = order.pop_front();
        checks++;
        if (i != exp_core || rdy_data.sw_id != word_t'(int'(1000 + delivered))) begin
          failures++; $display("task %0d went to core %0d, expected core %0d", rdy_data.sw_id, i, exp_core);
        end
        delivered++;
      end

  task automatic request(logic [N-1:0] m);
    logic [N-1:0] acc;
    wf_valid = m;
    while (wf_valid != 0) begin
      #1 acc = wf_valid & wf_ready;  // refused ones keep asking
      @(posedge clk); #1;
      wf_valid &= ~acc;
    end
  endtask

  assign picos_rdy_data = '{picos_id: picos_id_t'(next_task + 1), sw_id: word_t'(int'(1000 + next_task))};
  always @(posedge clk) if (!rst && picos_rdy_valid && picos_rdy_ready) next_task <= next_task + 1;

  initial begin
    wf_valid = 0; picos_rdy_valid = 0; rdy_ready = '1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    request(4'b0100); request(4'b0001); request(4'b1010); request(4'b1111);
    checks++;
    if (order.size() != 8 || order[0] != 2 || order[1] != 0) begin failures++; $display("request order wrong"); end
    rdy_ready = 4'b1101;              // core 1 cannot take a task yet
    picos_rdy_valid = 1;
    repeat (6) @(posedge clk);
    #1;
    checks++;
    if (delivered != 2) begin failures++; $display("delivered %0d before core 1 stall", delivered); end
    rdy_ready = '1;
    wait (delivered == 8);
    @(posedge clk); #1;
    checks++;
    if (picos_rdy_ready) begin failures++; $display("task taken with no request"); end
    // fill the order FIFO (depth 8) and check refusal
    picos_rdy_valid = 0;
    for (int r = 0; r < 2; r++) request(4'b1111);
    wf_valid = 4'b0001; #1;
    checks++;
    if (wf_ready != 0) begin failures++; $display("request accepted with full order FIFO"); end
    wf_valid = 0;
    picos_rdy_valid = 1;
    wait (delivered == 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
