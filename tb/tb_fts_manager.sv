// tb_fts_manager: FTS Manager with four cores' queues driven directly and a
// Picos model with room for only 3 in-flight tasks (so submissions are
// rejected and replayed). Core 0 submits 40 tasks with dependences; every
// core repeatedly requests a ready task, "runs" it for a random time and
// retires it, retrying when the Retirement Controller refuses. Checks that
// every task is run exactly once with its own SW ID, that every retirement
// reaches Picos, and that replays and retirement collisions happened.
module tb_fts_manager;
  import fts_pkg::*;
  localparam int N = 4, T = 40;
  logic clk = 0, rst = 1;
  logic  [N-1:0] init_valid, init_ready, info_valid, info_ready, dep_valid, dep_ready;
  logic  [N-1:0] wf_valid, wf_ready, ret_valid, ret_ready, rdy_valid, rdy_ready;
  init_t [N-1:0] init_data;
  word_t [N-1:0] info_data;
  dep_t  [N-1:0] dep_data;
  picos_id_t [N-1:0] ret_id;
  ready_t rdy_data;
  logic picos_sub_valid, picos_sub_ready, picos_sub_last, picos_sub_resp_valid, picos_sub_resp_nack;
  sub_beat_t picos_sub_beat;
  logic picos_rdy_valid, picos_rdy_ready, picos_ret_valid, picos_ret_ready, picos_ret_last;
  ready_t picos_rdy_data;
  word_t picos_ret_data;
  logic resubmit, ret_collision;
  int n_acc, n_nack, n_ret, n_bad;
  int checks = 0, failures = 0, n_resub = 0, n_coll = 0, n_run = 0;
  int ran[word_t];

  fts_manager #(.N(N)) dut (.*);
  picos_model #(.CAPACITY(3)) u_picos (
    .clk, .rst, .sub_valid(picos_sub_valid), .sub_ready(picos_sub_ready),
    .sub_beat(picos_sub_beat), .sub_last(picos_sub_last),
    .resp_valid(picos_sub_resp_valid), .resp_nack(picos_sub_resp_nack),
    .rdy_valid(picos_rdy_valid), .rdy_ready(picos_rdy_ready), .rdy_data(picos_rdy_data),
    .ret_valid(picos_ret_valid), .ret_ready(picos_ret_ready), .ret_data(picos_ret_data),
    .ret_last(picos_ret_last),
    .n_accepted(n_acc), .n_nacked(n_nack), .n_retired(n_ret), .n_bad_ret(n_bad));

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    if (resubmit) n_resub++;
    if (ret_collision) n_coll++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // submitter on core 0
  initial begin
    init_valid = 0; info_valid = 0; dep_valid = 0; init_data = '0; info_data = '0; dep_data = '0;
    wait (!rst);
    for (int k = 0; k < T; k++) begin
      init_valid[0] = 1; init_data[0] = '{sw_id: word_t'(int'(5000 + k)), num_deps: 8'(k % 3)};
      @(posedge clk); while (!init_ready[0]) @(posedge clk); #1 init_valid[0] = 0;
      info_valid[0] = 1; info_data[0] = word_t'(k);
      @(posedge clk); while (!info_ready[0]) @(posedge clk); #1 info_valid[0] = 0;
      for (int d = 0; d < k % 3; d++) begin
        dep_valid[0] = 1; dep_data[0] = '{dir: DEP_IN, two: 1'b0, addr1: '0, addr0: word_t'(d)};
        @(posedge clk); while (!dep_ready[0]) @(posedge clk); #1 dep_valid[0] = 0;
      end
    end
  end

  // workers on every core
  for (genvar c = 0; c < N; c++) begin : g_core
    initial begin
      wf_valid[c] = 0; ret_valid[c] = 0; rdy_ready[c] = 0; ret_id[c] = '0;
      wait (!rst);
      repeat (60) @(posedge clk);
      #1;
      forever begin
        picos_id_t pid;
        wf_valid[c] = 1;
        @(posedge clk); while (!wf_ready[c]) @(posedge clk); #1 wf_valid[c] = 0;
        rdy_ready[c] = 1;
        @(posedge clk); while (!rdy_valid[c]) @(posedge clk);
        pid = rdy_data.picos_id;
        if (ran.exists(rdy_data.sw_id)) begin failures++; $display("task run twice"); end
        ran[rdy_data.sw_id] = 1;
        n_run++;
        #1 rdy_ready[c] = 0;
        repeat ($urandom_range(0, 2)) @(posedge clk);
        #1 ret_valid[c] = 1; ret_id[c] = pid;
        #1;
        while (!ret_ready[c]) begin @(posedge clk); #2; end
        @(posedge clk); #1 ret_valid[c] = 0;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wait (n_ret == T);
    repeat (10) @(posedge clk);
    checks++; if (n_run != T || ran.num() != T) begin failures++; $display("ran %0d", n_run); end
    for (int k = 0; k < T; k++) begin
      checks++;
      if (!ran.exists(word_t'(int'(5000 + k)))) begin failures++; $display("task %0d never ran", k); end
    end
    checks++; if (n_acc != T || n_bad != 0) begin failures++; $display("accepted %0d bad %0d", n_acc, n_bad); end
    checks++; if (n_resub == 0 || n_resub != n_nack) begin failures++; $display("resub %0d nack %0d", n_resub, n_nack); end
    checks++; if (n_coll == 0) begin failures++; $display("no retirement collision"); end
    $display("replays=%0d collisions=%0d", n_resub, n_coll);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
