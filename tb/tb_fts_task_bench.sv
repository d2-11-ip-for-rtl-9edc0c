// tb_fts_task_bench: the Task Free and Task Chain overhead benchmarks on
// the full-size many-core scheduler (30 cores, default parameters).
//
// As in the evaluated system, core 0 both creates and executes tasks and
// cores 1..29 only execute. Task Free creates independent tasks with 0 to
// 15 input pointers (two tasks per pointer count, every pointer distinct).
// Task Chain creates, for each pointer count 1 to 15, a chain of three
// tasks that all write the same pointers, so each must wait for the one
// before it; with 0 pointers a chain has no dependences and equals Task
// Free. Pointers go out as Send IN/OUT Deps pairs plus one single Send
// IN/OUT Dep when the count is odd. A Picos model that tracks dependences
// (and holds at most 16 tasks, rejecting the rest) releases tasks.
// Checks: every task runs exactly once and is retired; no chain task
// starts before its predecessor retired; the chains really were held back
// (a successor was submitted while its predecessor was still running) and
// the 16-task limit caused replays. Runs the top at its defaults.
module tb_fts_task_bench;
  import fts_pkg::*;
  localparam int N = 30, FREE_REP = 2, CHAIN_LEN = 3;
  localparam int NFREE = 16 * FREE_REP, NCHAIN = 15 * CHAIN_LEN, NT = NFREE + NCHAIN;

  logic clk = 0, rst = 1, rstn = 0;
  logic  [N-1:0] cmd_valid, cmd_ready, cmd_xd, resp_valid, resp_ready, core_busy;
  logic  [6:0]   cmd_funct7 [N];
  logic  [4:0]   cmd_rd [N], resp_rd [N];
  word_t         cmd_rs1 [N], cmd_rs2 [N], resp_data [N];
  logic picos_sub_valid, picos_sub_ready, picos_sub_last, picos_sub_resp_valid, picos_sub_resp_nack;
  sub_beat_t picos_sub_beat;
  logic picos_rdy_valid, picos_rdy_ready, picos_ret_valid, picos_ret_ready, picos_ret_last;
  ready_t picos_rdy_data;
  word_t picos_ret_data;
  logic resubmit, ret_collision;
  // the accelerator-side design is idle in this test
  logic host_in_en = 0, host_out_en = 0;
  logic [7:0] host_in_we = 0, host_out_we = 0;
  logic [31:0] host_in_addr = 0, host_out_addr = 0;
  logic [63:0] host_in_din = 0, host_out_din = 0, host_in_dout, host_out_dout;
  logic [15:0] acc_in_tvalid, acc_out_tready, acc_busy;
  logic [15:0] acc_in_tready = '1, acc_out_tvalid = '0, acc_out_tlast = '0;
  logic [63:0] acc_in_tdata, acc_out_tdata [16];
  logic acc_in_tlast;
  int n_acc, n_nack, n_ret, n_bad;
  int checks = 0, failures = 0;

  fts_system_top dut (.*);

  picos_model #(.CAPACITY(16), .TRACK_DEPS(1)) u_picos (
    .clk, .rst, .sub_valid(picos_sub_valid), .sub_ready(picos_sub_ready),
    .sub_beat(picos_sub_beat), .sub_last(picos_sub_last),
    .resp_valid(picos_sub_resp_valid), .resp_nack(picos_sub_resp_nack),
    .rdy_valid(picos_rdy_valid), .rdy_ready(picos_rdy_ready), .rdy_data(picos_rdy_data),
    .ret_valid(picos_ret_valid), .ret_ready(picos_ret_ready), .ret_data(picos_ret_data),
    .ret_last(picos_ret_last),
    .n_accepted(n_acc), .n_nacked(n_nack), .n_retired(n_ret), .n_bad_ret(n_bad));

  initial for (int a = 0; a < 16; a++) acc_out_tdata[a] = '0;
  always #5 clk = ~clk;

  int m_replay = 0;
  always @(posedge clk) if (!rst && resubmit) m_replay++;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog: retired %0d/%0d", n_ret, NT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // software task IDs: Task Free 0x1000 + 16*n + r, Task Chain 0x2000 + 16*n + k
  function automatic word_t free_id(int n, int r);  return word_t'(int'(32'h1000 + 16 * n + r)); endfunction
  function automatic word_t chain_id(int n, int k); return word_t'(int'(32'h2000 + 16 * n + k)); endfunction

  longint t_start [word_t], t_retired [word_t], t_created [word_t];
  int n_run = 0;

  for (genvar c = 0; c < N; c++) begin : g_core
    semaphore port = new(1);
    task automatic rocc(funct7_e fn, word_t a, word_t b, output word_t r);
      port.get(1);
      @(negedge clk);
      cmd_valid[c] = 1; cmd_funct7[c] = fn; cmd_rs1[c] = a; cmd_rs2[c] = b; cmd_xd[c] = 1; cmd_rd[c] = 5'd10;
      while (!cmd_ready[c]) @(negedge clk);
      @(posedge clk);
      #1 cmd_valid[c] = 0;
      while (!resp_valid[c]) begin @(posedge clk); #1; end
      r = resp_data[c];
      @(posedge clk); #1;
      port.put(1);
    endtask
    task automatic must(funct7_e fn, word_t a, word_t b);
      word_t r;
      do rocc(fn, a, b, r); while (r != 1);
    endtask
    // create one task with n pointers starting at base (8-byte stride)
    task automatic create(word_t id, int n, word_t base, bit write);
      int i;
      must(FN_INIT_TASK, id, word_t'(n));
      must(FN_ADD_INFO, id ^ 64'hFFFF, 0);
      for (i = 0; i + 1 < n; i += 2)
        must(write ? FN_OUT_DEPS : FN_IN_DEPS, base + word_t'(int'(8 * i)), base + word_t'(int'(8 * (i + 1))));
      if (i < n) must(write ? FN_OUT_DEP : FN_IN_DEP, base + word_t'(int'(8 * i)), 0);
      t_created[id] = $time;
    endtask

    initial begin
      cmd_valid[c] = 0; cmd_funct7[c] = 0; cmd_rs1[c] = 0; cmd_rs2[c] = 0; cmd_xd[c] = 0; cmd_rd[c] = 0;
      resp_ready[c] = 1;
      wait (!rst);
      fork
        if (c == 0) begin : creator
          for (int n = 0; n < 16; n++)
            for (int r = 0; r < FREE_REP; r++)
              create(free_id(n, r), n, 64'h1_0000_0000 + word_t'(int'((n * FREE_REP + r) * 256)), 1'b0);
          for (int n = 1; n < 16; n++)
            for (int k = 0; k < CHAIN_LEN; k++)
              create(chain_id(n, k), n, 64'h2_0000_0000 + word_t'(int'(n * 256)), 1'b1);
        end
        begin : worker
          repeat (c * 5) @(posedge clk);
          #1;
          forever begin
            word_t sw, pid;
            must(FN_READY_REQ, 0, 0);
            do begin
              rocc(FN_FETCH_SWID, 0, 0, sw);
              if (sw == 0) begin repeat ($urandom_range(0, 4)) @(posedge clk); #1; end
            end while (sw == 0);
            rocc(FN_FETCH_PICOS, 0, 0, pid);
            checks++;
            if (pid[32] != 1'b1) begin failures++; $display("no Picos ID after SW ID"); end
            if (t_start.exists(sw)) begin failures++; $display("task %h ran twice", sw); end
            t_start[sw] = $time;
            n_run++;
            repeat ($urandom_range(100, 300)) @(posedge clk);  // task body
            #1;
            t_retired[sw] = $time;      // before the retirement can release a successor
            must(FN_RETIRE, word_t'(pid[31:0]), 0);
          end
        end
      join
    end
  end

  initial begin
    int held;
    picos_sub_ready = 0;
    repeat (5) @(posedge clk);
    #1 rst = 0; rstn = 1;
    wait (n_ret == NT);
    repeat (20) @(posedge clk);
    checks++; if (n_run != NT || n_acc != NT || n_bad != 0) begin
      failures++; $display("ran %0d accepted %0d bad %0d of %0d", n_run, n_acc, n_bad, NT);
    end
    for (int n = 0; n < 16; n++)
      for (int r = 0; r < FREE_REP; r++) begin
        checks++;
        if (!t_start.exists(free_id(n, r))) begin failures++; $display("free task %0d/%0d lost", n, r); end
      end
    held = 0;
    for (int n = 1; n < 16; n++)
      for (int k = 1; k < CHAIN_LEN; k++) begin
        checks++;
        if (!t_start.exists(chain_id(n, k)) || !t_retired.exists(chain_id(n, k - 1))) begin
          failures++; $display("chain %0d task %0d missing", n, k);
        end else begin
          if (t_start[chain_id(n, k)] <= t_retired[chain_id(n, k - 1)]) begin
            failures++; $display("chain %0d: task %0d started before task %0d retired", n, k, k - 1);
          end
          if (t_created[chain_id(n, k)] < t_retired[chain_id(n, k - 1)]) held++;
        end
      end
    $display("mechanisms: chain links held back by dependences=%0d replays=%0d", held, m_replay);
    checks++; if (held == 0)     begin failures++; $display("no chain task was ever held back"); end
    checks++; if (m_replay == 0) begin failures++; $display("Picos capacity never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
