// tb_core_sub_handler: one core's submission handler.
// Queues three tasks (3 dependences with a two-pointer entry, 0
// dependences, 2 dependences as two single entries) and checks the request
// length and the exact beat sequence of each, under random back-pressure,
// including that the request drops while a task is being sent.
module tb_core_sub_handler;
  import fts_pkg::*;
  logic clk = 0, rst = 1;
  logic init_valid, init_ready, info_valid, info_ready, dep_valid, dep_ready;
  init_t init_data;
  word_t info_data;
  dep_t  dep_data;
  logic req_valid, sel, out_valid, out_ready, out_last;
  logic [SEQ_LEN_W-1:0] req_len;
  sub_beat_t out_beat;
  int checks = 0, failures = 0;
  sub_beat_t exp_q[$];
  int exp_len[$];

  core_sub_handler dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push_init(word_t id, int nd);
    init_valid = 1; init_data = '{sw_id: id, num_deps: 8'(nd)};
    @(posedge clk); while (!init_ready) @(posedge clk);
    #1 init_valid = 0;
  endtask
  task automatic push_info(word_t d);
    info_valid = 1; info_data = d;
    @(posedge clk); while (!info_ready) @(posedge clk);
    #1 info_valid = 0;
  endtask
  task automatic push_dep(dep_dir_e dir, logic two, word_t a0, word_t a1);
    dep_valid = 1; dep_data = '{dir: dir, two: two, addr1: a1, addr0: a0};
    @(posedge clk); while (!dep_ready) @(posedge clk);
    #1 dep_valid = 0;
  endtask

  // expected sequences
  task automatic expect_task(word_t id, word_t info, int nd, sub_beat_t deps[$]);
    exp_len.push_back(3 + nd);
    exp_q.push_back('{kind: BEAT_HDR, data: word_t'(nd)});
    exp_q.push_back('{kind: BEAT_SWID, data: id});
    exp_q.push_back('{kind: BEAT_INFO, data: info});
    foreach (deps[i]) exp_q.push_back(deps[i]);
  endtask

  // arbiter side: grant a pending request after a random delay
  int tasks_done = 0, beats_in_task = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (out_valid && out_ready) begin
        sub_beat_t e;
        e = exp_q.pop_front();
        beats_in_task++;
        checks++;
        if (out_beat != e) begin
          failures++; $display("beat mismatch kind=%0d data=%h exp %0d %h", out_beat.kind, out_beat.data, e.kind, e.data);
        end
        checks++;
        if (out_last != (exp_q.size() == 0 || exp_q[0].kind == BEAT_HDR)) begin
          failures++; $display("last wrong");
        end
        if (req_valid) begin failures++; $display("request high while sending"); end
        if (out_last) begin tasks_done++; beats_in_task = 0; end
      end
    end
  end

  initial begin
    init_valid = 0; info_valid = 0; dep_valid = 0; sel = 0; out_ready = 0;
    init_data = '0; info_data = '0; dep_data = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    expect_task(64'hA1, 64'h1111, 3, '{'{BEAT_DEP_IN, 64'h100}, '{BEAT_DEP_IN, 64'h108}, '{BEAT_DEP_OUT, 64'h200}});
    expect_task(64'hA2, 64'h2222, 0, '{});
    expect_task(64'hA3, 64'h3333, 2, '{'{BEAT_DEP_OUT, 64'h300}, '{BEAT_DEP_IN, 64'h400}});
    push_init(64'hA1, 3); push_info(64'h1111);
    push_dep(DEP_IN, 1, 64'h100, 64'h108); push_dep(DEP_OUT, 0, 64'h200, 64'h0);
    push_init(64'hA2, 0); push_info(64'h2222);
    fork
      begin
        push_init(64'hA3, 2); push_info(64'h3333);
        push_dep(DEP_OUT, 0, 64'h300, 0); push_dep(DEP_IN, 0, 64'h400, 0);
      end
      begin
        for (int t = 0; t < 3; t++) begin
          while (!req_valid) @(posedge clk);
          checks++;
          if (int'(req_len) != exp_len[t]) begin failures++; $display("len %0d exp %0d", req_len, exp_len[t]); end
          repeat ($urandom_range(0, 3)) @(posedge clk);
          #1 sel = 1; @(posedge clk); #1 sel = 0;
          while (tasks_done <= t) begin
            out_ready = ($urandom_range(0, 2) != 0);
            @(posedge clk); #1;
          end
        end
      end
    join
    checks++;
    if (tasks_done != 3 || exp_q.size() != 0) failures++;
    repeat (3) @(posedge clk);
    checks++;
    if (req_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
