// tb_fts_core: the FTS IP core with its two queue memories, the stream
// demultiplexer/multiplexer and four accelerator models. The host writes
// Execute Task and Execute Periodic Task commands for every accelerator;
// the scheduler must deliver each to its accelerator, keep it busy until
// its Finished Task, and post every Finished Task (with the task id of the
// command) in the accelerator's command-out sub-queue, in order. The host
// polls and clears the command-out queue. Also checks the Finished Task
// turnaround from the accelerator's last word to the queue entry.
module tb_fts_core;
  import fts_pkg::*;
  localparam int A = 4, QL = 16, TASKS = 12;
  logic clk = 0, rstn = 0;
  logic [1:0] co_tid, ci_tdest;
  logic [63:0] co_tdata, ci_tdata, ci_dout, co_dout, ci_din, co_din;
  logic co_tvalid, co_tready, ci_tlast, ci_tvalid, ci_tready;
  logic ci_en, co_en, ci_clk, co_clk, ci_rst, co_rst;
  logic [7:0] ci_we, co_we;
  logic [31:0] ci_addr, co_addr;
  logic [A-1:0] acc_busy;
  logic hi_en, ho_en;
  logic [7:0] hi_we, ho_we;
  logic [31:0] hi_addr, ho_addr;
  logic [63:0] hi_din, ho_din, hi_dout, ho_dout;
  logic [A-1:0] a_in_v, a_in_r, a_out_v, a_out_r, a_out_l;
  logic [63:0] a_in_d, a_out_d [A];
  logic a_in_l;
  int n_cmds [A], n_words [A];
  int checks = 0, failures = 0;

  fts_core #(.MAX_ACCS(A), .CMDIN_QUEUE_LEN(QL), .CMDOUT_QUEUE_LEN(QL)) dut (
    .clk, .rstn,
    .cmdout_in_tid(co_tid), .cmdout_in_tdata(co_tdata), .cmdout_in_tvalid(co_tvalid), .cmdout_in_tready(co_tready),
    .cmdin_out_tdest(ci_tdest), .cmdin_out_tdata(ci_tdata), .cmdin_out_tlast(ci_tlast),
    .cmdin_out_tvalid(ci_tvalid), .cmdin_out_tready(ci_tready),
    .cmdin_queue_en(ci_en), .cmdin_queue_dout(ci_dout), .cmdin_queue_din(ci_din), .cmdin_queue_we(ci_we),
    .cmdin_queue_addr(ci_addr), .cmdin_queue_clk(ci_clk), .cmdin_queue_rst(ci_rst),
    .cmdout_queue_en(co_en), .cmdout_queue_dout(co_dout), .cmdout_queue_din(co_din), .cmdout_queue_we(co_we),
    .cmdout_queue_addr(co_addr), .cmdout_queue_clk(co_clk), .cmdout_queue_rst(co_rst),
    .acc_busy);
  cmd_queue_bram #(.WORDS(A * QL)) u_qin (.clk,
    .a_en(ci_en), .a_we(ci_we), .a_addr(ci_addr), .a_din(ci_din), .a_dout(ci_dout),
    .b_en(hi_en), .b_we(hi_we), .b_addr(hi_addr), .b_din(hi_din), .b_dout(hi_dout));
  cmd_queue_bram #(.WORDS(A * QL)) u_qout (.clk,
    .a_en(co_en), .a_we(co_we), .a_addr(co_addr), .a_din(co_din), .a_dout(co_dout),
    .b_en(ho_en), .b_we(ho_we), .b_addr(ho_addr), .b_din(ho_din), .b_dout(ho_dout));
  axis_cmd_demux #(.N(A)) u_dmx (.s_tdest(ci_tdest), .s_tdata(ci_tdata), .s_tlast(ci_tlast),
    .s_tvalid(ci_tvalid), .s_tready(ci_tready), .m_tvalid(a_in_v), .m_tready(a_in_r),
    .m_tdata(a_in_d), .m_tlast(a_in_l));
  axis_cmd_mux #(.N(A)) u_mx (.clk, .rst(!rstn), .s_tvalid(a_out_v), .s_tready(a_out_r),
    .s_tdata(a_out_d), .s_tlast(a_out_l), .m_tid(co_tid), .m_tdata(co_tdata),
    .m_tvalid(co_tvalid), .m_tready(co_tready));
  for (genvar g = 0; g < A; g++) begin : g_acc
    acc_model #(.EXEC_CYCLES(10 + 7 * g)) u_acc (.clk, .rst(!rstn),
      .in_tvalid(a_in_v[g]), .in_tready(a_in_r[g]), .in_tdata(a_in_d), .in_tlast(a_in_l),
      .out_tvalid(a_out_v[g]), .out_tready(a_out_r[g]), .out_tdata(a_out_d[g]), .out_tlast(a_out_l[g]),
      .n_cmds(n_cmds[g]), .n_words(n_words[g]));
  end
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    for (int a = 0; a < A; a++) $display("acc %0d: cmds %0d words %0d done %0d busy %b", a, n_cmds[a], n_words[a], done[a], acc_busy[a]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- host side (one process owns each port) ----
  task automatic hwr(int a, int slot, logic [63:0] d);
    @(negedge clk); hi_en = 1; hi_we = 8'hFF; hi_addr = 32'((a * QL + slot) * 8); hi_din = d;
    @(negedge clk); hi_en = 0; hi_we = 0;
  endtask
  task automatic hrd_in(int a, int slot, output logic [63:0] d);
    @(negedge clk); hi_en = 1; hi_we = 0; hi_addr = 32'((a * QL + slot) * 8);
    @(negedge clk); hi_en = 0; d = hi_dout;
  endtask

  int wp [A], rp [A], done [A];
  int max_turn = 0;
  bit busy_ok = 1;

  // writer: one command per accelerator per round, each waits for room
  initial begin
    hi_en = 0; hi_we = 0; hi_addr = 0; hi_din = 0;
    wait (rstn);
    for (int k = 0; k < TASKS; k++)
      for (int a = 0; a < A; a++) begin
        logic [63:0] w[$], h;
        logic [7:0] code;
        int na;
        w.delete();
        code = (k % 3 == 2) ? CMD_EXEC_PERIODIC : CMD_EXEC;
        na = k % 4;
        w.push_back({ENTRY_VALID, 8'h00, 8'h1F, 8'h01, 16'h0, 8'(na), code});
        w.push_back(64'(1000 * a + k));
        w.push_back(64'hFFFF);
        if (code == CMD_EXEC_PERIODIC) w.push_back({32'd10, 32'd2});
        for (int i = 0; i < na; i++) begin w.push_back({24'h0, 32'(i), 8'h01}); w.push_back(64'(i)); end
        // wait until the slots we need are free (header slot cleared)
        forever begin
          bit free;
          free = 1;
          for (int i = 0; i < w.size(); i++) begin
            hrd_in(a, (wp[a] + i) % QL, h);
            if (h != 0) free = 0;
          end
          if (free) break;
          repeat (10) @(posedge clk);
        end
        for (int i = w.size() - 1; i >= 0; i--) hwr(a, (wp[a] + i) % QL, w[i]);
        wp[a] = (wp[a] + w.size()) % QL;
      end
  end

  // reader of the command-out queue
  initial begin
    logic [63:0] h, t;
    ho_en = 0; ho_we = 0; ho_addr = 0; ho_din = 0;
    wait (rstn);
    while (1) begin
      bit all;
      all = 1;
      for (int a = 0; a < A; a++) begin
        @(negedge clk); ho_en = 1; ho_we = 0; ho_addr = 32'((a * QL + rp[a]) * 8);
        @(negedge clk); h = ho_dout;
        if (h[63:56] == ENTRY_VALID) begin
          ho_addr = 32'((a * QL + (rp[a] + 1) % QL) * 8);
          @(negedge clk); t = ho_dout;
          checks++;
          if (h[7:0] != CMD_FINISHED || t != 64'(1000 * a + done[a])) begin
            failures++; $display("acc %0d finished %h %h, expected task %0d", a, h, t, done[a]);
          end
          done[a]++;
          ho_we = 8'hFF; ho_din = 0; ho_addr = 32'((a * QL + rp[a]) * 8);
          @(negedge clk);
          ho_we = 0;
          rp[a] = (rp[a] + 2) % QL;
        end
        ho_en = 0;
        if (done[a] < TASKS) all = 0;
      end
      if (all) break;
    end
  end

  // no accelerator may receive a word while it is busy with a task
  always @(posedge clk) if (rstn) for (int a = 0; a < A; a++) begin
    if (a_in_v[a] && a_in_r[a] && acc_busy[a]) busy_ok = 0;
  end

  initial begin
    // host software clears both queues before releasing the scheduler
    for (int i = 0; i < A * QL; i++) begin
      @(negedge clk);
      hi_en = 1; hi_we = 8'hFF; hi_addr = 32'(i * 8); hi_din = 0;
      ho_en = 1; ho_we = 8'hFF; ho_addr = 32'(i * 8); ho_din = 0;
    end
    @(negedge clk); hi_en = 0; hi_we = 0; ho_en = 0; ho_we = 0;
    #1 rstn = 1;
    for (int a = 0; a < A; a++) wait (done[a] == TASKS);
    for (int a = 0; a < A; a++) begin
      checks++;
      if (n_cmds[a] != TASKS) begin failures++; $display("acc %0d ran %0d", a, n_cmds[a]); end
    end
    checks++; if (!busy_ok) begin failures++; $display("command sent to busy accelerator"); end
    checks++; if (!(ci_clk === clk) || ci_rst || co_rst) begin failures++; $display("BRAM clk/rst ports wrong"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
