// tb_fts_system_top: end-to-end test of both designs at their default
// sizes (30 cores, 16 accelerators, 64-slot sub-queues).
//
// Design 1: every core runs a small task runtime through its FTS Delegate.
// Cores 0..2 create tasks (Initiate Task, Add Info, Send IN/OUT Dep(s)),
// retrying whenever an instruction reports a full queue; every core loops
// Ready Task Request -> Fetch SW ID (poll) -> Fetch Picos ID -> run ->
// Retire Task (retrying when refused). A Picos model with room for 8
// in-flight tasks, which also rejects every 7th submission, sits on the
// Picos ports, so submissions get replayed. Checks every task runs exactly
// once and is retired.
// Design 2: a host writes Execute and Execute Periodic Task commands for
// all 16 accelerators and collects the Finished Task entries; one
// command-out slot is held by the host for a while so the scheduler must
// wait for it. Checks every task finishes on the right accelerator, in
// order.
// Each mechanism is counted and must occur: submission replay, several
// cores submitting at once, retirement collision, instruction refusal,
// empty ready-queue fetch, busy accelerator skipped, periodic command,
// accelerators finishing together, waiting for a command-out slot.
module tb_fts_system_top;
  import fts_pkg::*;
  localparam int N = 30, A = 16, QL = 64;
  localparam int SUBMITTERS = 3, TPS = 20;          // tasks per submitter
  localparam int NT = SUBMITTERS * TPS;
  localparam int ATASKS = 6;                        // commands per accelerator

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
  logic host_in_en, host_out_en;
  logic [7:0] host_in_we, host_out_we;
  logic [31:0] host_in_addr, host_out_addr;
  logic [63:0] host_in_din, host_out_din, host_in_dout, host_out_dout;
  logic [A-1:0] acc_in_tvalid, acc_in_tready, acc_out_tvalid, acc_out_tready, acc_out_tlast, acc_busy;
  logic [63:0] acc_in_tdata, acc_out_tdata [A];
  logic acc_in_tlast;
  int n_acc, n_nack, n_ret, n_bad;
  int n_cmds [A], n_words [A];
  int checks = 0, failures = 0;

  fts_system_top dut (.*);

  picos_model #(.CAPACITY(8), .NACK_EVERY(7)) u_picos (
    .clk, .rst, .sub_valid(picos_sub_valid), .sub_ready(picos_sub_ready),
    .sub_beat(picos_sub_beat), .sub_last(picos_sub_last),
    .resp_valid(picos_sub_resp_valid), .resp_nack(picos_sub_resp_nack),
    .rdy_valid(picos_rdy_valid), .rdy_ready(picos_rdy_ready), .rdy_data(picos_rdy_data),
    .ret_valid(picos_ret_valid), .ret_ready(picos_ret_ready), .ret_data(picos_ret_data),
    .ret_last(picos_ret_last),
    .n_accepted(n_acc), .n_nacked(n_nack), .n_retired(n_ret), .n_bad_ret(n_bad));

  for (genvar g = 0; g < A; g++) begin : g_acc
    acc_model #(.EXEC_CYCLES(5 + 3 * (g % 4))) u_acc (.clk, .rst(!rstn),
      .in_tvalid(acc_in_tvalid[g]), .in_tready(acc_in_tready[g]), .in_tdata(acc_in_tdata),
      .in_tlast(acc_in_tlast),
      .out_tvalid(acc_out_tvalid[g]), .out_tready(acc_out_tready[g]), .out_tdata(acc_out_tdata[g]),
      .out_tlast(acc_out_tlast[g]), .n_cmds(n_cmds[g]), .n_words(n_words[g]));
  end

  always #5 clk = ~clk;

  // mechanism counters
  int m_replay = 0, m_multi_sub = 0, m_ret_coll = 0, m_refused = 0, m_empty_fetch = 0;
  int m_busy_skip = 0, m_periodic = 0, m_acc_contention = 0, m_slot_wait = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (resubmit) m_replay++;
      if (ret_collision) m_ret_coll++;
      if ($countones(dut.u_manager.u_sub.req_valid) > 1) m_multi_sub++;
    end
    if (rstn) begin
      if ($countones(acc_out_tvalid) > 1) m_acc_contention++;
      if ((acc_in_tvalid & acc_in_tready) != 0 && acc_in_tdata[63:56] == ENTRY_VALID
          && acc_in_tdata[7:0] == CMD_EXEC_PERIODIC) m_periodic++;
      if (dut.u_fts.u_in.state == 3'd0 && dut.u_fts.u_in.acc_busy[dut.u_fts.u_in.acc]) m_busy_skip++;
      if (dut.u_fts.u_out.state == 3'd3 && dut.u_fts.u_out.q_dout[63:56] == ENTRY_VALID) m_slot_wait++;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: retired %0d/%0d, accepted %0d", n_ret, NT, n_acc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ================= design 1: per-core runtime =================
  int ran [word_t];
  int n_run = 0, retired_by_cores = 0;

  for (genvar c = 0; c < N; c++) begin : g_core
    // creator and worker threads of one core share its port, one instruction at a time
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
      forever begin
        rocc(fn, a, b, r);
        if (r == 1) break;
        m_refused++;
      end
    endtask

    initial begin
      cmd_valid[c] = 0; cmd_funct7[c] = 0; cmd_rs1[c] = 0; cmd_rs2[c] = 0; cmd_xd[c] = 0; cmd_rd[c] = 0;
      resp_ready[c] = 1;
      wait (!rst);
      fork
        if (c < SUBMITTERS) begin : creator
          for (int k = 0; k < TPS; k++) begin
            word_t id;
            int nd;
            id = word_t'(int'((c + 1) * 1000 + k));
            nd = k % 4;
            must(FN_INIT_TASK, id, word_t'(nd));
            must(FN_ADD_INFO, ~id, 0);
            case (nd)
              1: must(FN_IN_DEP, id << 8, 0);
              2: must(FN_IN_DEPS, id << 8, (id << 8) + 8);
              3: begin must(FN_OUT_DEPS, id << 8, (id << 8) + 8); must(FN_OUT_DEP, (id << 8) + 16, 0); end
              default: ;
            endcase
          end
        end
        begin : worker
          repeat (c * 7) @(posedge clk);
          #1;
          forever begin
            word_t sw, pid;
            must(FN_READY_REQ, 0, 0);
            forever begin
              rocc(FN_FETCH_SWID, 0, 0, sw);
              if (sw != 0) break;
              m_empty_fetch++;
              repeat ($urandom_range(0, 4)) @(posedge clk);
              #1;
            end
            rocc(FN_FETCH_PICOS, 0, 0, pid);
            checks++;
            if (pid[32] != 1'b1) begin failures++; $display("Fetch Picos ID empty after SW ID"); end
            if (ran.exists(sw)) begin failures++; $display("task %0d ran twice", sw); end
            ran[sw] = c;
            n_run++;
            repeat ($urandom_range(0, 3)) @(posedge clk);
            #1;
            must(FN_RETIRE, word_t'(pid[31:0]), 0);
            retired_by_cores++;
          end
        end
      join
    end
  end

  // ================= design 2: host =================
  int wp [A], rp [A], done [A];
  bit hold_released = 0;

  task automatic hwr_in(int a, int slot, logic [63:0] d);
    @(negedge clk); host_in_en = 1; host_in_we = 8'hFF; host_in_addr = 32'((a * QL + slot) * 8); host_in_din = d;
    @(negedge clk); host_in_en = 0; host_in_we = 0;
  endtask

  initial begin : writer
    host_in_en = 0; host_in_we = 0; host_in_addr = 0; host_in_din = 0;
    wait (rstn);
    for (int k = 0; k < ATASKS; k++)
      for (int a = 0; a < A; a++) begin
        logic [63:0] w[$];
        logic [7:0] code;
        int na;
        w.delete();
        code = ((k + a) % 3 == 2) ? CMD_EXEC_PERIODIC : CMD_EXEC;
        na = (k + a) % 5;
        w.push_back({ENTRY_VALID, 8'h00, 8'h1F, 8'h01, 16'h0, 8'(na), code});
        w.push_back(64'(1000 * a + k));
        w.push_back(64'h0);
        if (code == CMD_EXEC_PERIODIC) w.push_back({32'd100, 32'd3});
        for (int i = 0; i < na; i++) begin w.push_back({24'h0, 32'(i), 8'h02}); w.push_back(64'(i) << 12); end
        // 6 commands of at most 14 words fit a 64-slot sub-queue: no wrap wait needed
        for (int i = w.size() - 1; i >= 0; i--) hwr_in(a, (wp[a] + i) % QL, w[i]);
        wp[a] = (wp[a] + w.size()) % QL;
      end
  end

  initial begin : reader
    logic [63:0] h, t;
    host_out_en = 0; host_out_we = 0; host_out_addr = 0; host_out_din = 0;
    wait (rstn);
    // hold the first command-out slot of accelerator 5 for a while
    @(negedge clk); host_out_en = 1; host_out_we = 8'hFF; host_out_addr = 32'((5 * QL) * 8);
    host_out_din = {ENTRY_VALID, 56'h0};
    @(negedge clk); host_out_en = 0; host_out_we = 0;
    repeat (600) @(posedge clk);
    @(negedge clk); host_out_en = 1; host_out_we = 8'hFF; host_out_din = 0;
    @(negedge clk); host_out_en = 0; host_out_we = 0;
    hold_released = 1;
    while (1) begin
      bit all;
      all = 1;
      for (int a = 0; a < A; a++) begin
        @(negedge clk); host_out_en = 1; host_out_we = 0; host_out_addr = 32'((a * QL + rp[a]) * 8);
        @(negedge clk); h = host_out_dout;
        if (h[63:56] == ENTRY_VALID) begin
          host_out_addr = 32'((a * QL + (rp[a] + 1) % QL) * 8);
          @(negedge clk); t = host_out_dout;
          checks++;
          if (h[7:0] != CMD_FINISHED || t != 64'(1000 * a + done[a])) begin
            failures++; $display("acc %0d finished %h, expected task %0d", a, t, done[a]);
          end
          done[a]++;
          host_out_we = 8'hFF; host_out_din = 0; host_out_addr = 32'((a * QL + rp[a]) * 8);
          @(negedge clk); host_out_we = 0;
          rp[a] = (rp[a] + 2) % QL;
        end
        host_out_en = 0;
        if (done[a] < ATASKS) all = 0;
      end
      if (all) break;
    end
  end

  // ================= run =================
  initial begin
    picos_sub_ready = 0;
    repeat (3) @(posedge clk);
    // host software clears both command queues before releasing the scheduler
    for (int i = 0; i < A * QL; i++) begin
      @(negedge clk);
      host_in_en = 1; host_in_we = 8'hFF; host_in_addr = 32'(i * 8); host_in_din = 0;
      host_out_en = 1; host_out_we = 8'hFF; host_out_addr = 32'(i * 8); host_out_din = 0;
    end
    @(negedge clk); host_in_en = 0; host_in_we = 0; host_out_en = 0; host_out_we = 0;
    #1 rst = 0; rstn = 1;
    wait (n_ret == NT);
    for (int a = 0; a < A; a++) wait (done[a] == ATASKS);
    repeat (20) @(posedge clk);
    // design 1
    checks++; if (n_run != NT || ran.num() != NT) begin failures++; $display("ran %0d of %0d", n_run, NT); end
    for (int c = 0; c < SUBMITTERS; c++)
      for (int k = 0; k < TPS; k++) begin
        checks++;
        if (!ran.exists(word_t'(int'((c + 1) * 1000 + k)))) begin failures++; $display("task %0d/%0d lost", c, k); end
      end
    checks++; if (n_acc != NT || n_bad != 0 || retired_by_cores != NT) begin
      failures++; $display("accepted %0d bad %0d retired %0d", n_acc, n_bad, retired_by_cores);
    end
    // design 2
    for (int a = 0; a < A; a++) begin
      checks++;
      if (n_cmds[a] != ATASKS) begin failures++; $display("acc %0d ran %0d", a, n_cmds[a]); end
    end
    $display("mechanisms: replay=%0d multi_submit=%0d ret_collision=%0d refused=%0d empty_fetch=%0d",
             m_replay, m_multi_sub, m_ret_coll, m_refused, m_empty_fetch);
    $display("            busy_skip=%0d periodic=%0d acc_contention=%0d slot_wait=%0d",
             m_busy_skip, m_periodic, m_acc_contention, m_slot_wait);
    checks++; if (m_replay == 0)         begin failures++; $display("no submission replay"); end
    checks++; if (m_multi_sub == 0)      begin failures++; $display("no concurrent submissions"); end
    checks++; if (m_ret_coll == 0)       begin failures++; $display("no retirement collision"); end
    checks++; if (m_refused == 0)        begin failures++; $display("no refused instruction"); end
    checks++; if (m_empty_fetch == 0)    begin failures++; $display("no empty fetch"); end
    checks++; if (m_busy_skip == 0)      begin failures++; $display("no busy accelerator skipped"); end
    checks++; if (m_periodic == 0)       begin failures++; $display("no periodic command"); end
    checks++; if (m_acc_contention == 0) begin failures++; $display("no simultaneous finish"); end
    checks++; if (m_slot_wait == 0)      begin failures++; $display("no command-out slot wait"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
