// tb_cmd_in: Command in controller with a queue memory of 4 accelerators x
// 16 slots. The host writes batches of Execute Task (0x01), Execute
// Periodic Task (0x05) and an even-coded command (0x02) into each
// sub-queue (payload first, header last), wrapping around the sub-queue.
// Checks: each accelerator receives its commands whole, in order, word for
// word, with tdest and tlast right; an odd code keeps the accelerator busy
// (nothing more sent) until acc_free; an even code does not; argument
// counts above MAX_ARGS are clipped; every consumed slot is cleared.
module tb_cmd_in;
  import fts_pkg::*;
  localparam int A = 4, QL = 16, MAXA = 3;
  logic clk = 0, rst = 1;
  logic q_en, b_en;
  logic [7:0] q_we, b_we;
  logic [31:0] q_addr, b_addr;
  logic [63:0] q_din, q_dout, b_din, b_dout;
  logic [1:0] tdest, acc_free_idx;
  logic [63:0] tdata;
  logic tlast, tvalid, tready, acc_free_valid;
  logic [A-1:0] acc_busy;
  int checks = 0, failures = 0;
  logic [63:0] exp_w [A][$];
  int exp_cmd_end [A][$];     // word count at which each command ends
  int got [A], cmds_got [A], hwp [A];
  bit wait_free [A];
  int busy_violations = 0, even_seen = 0;

  cmd_in #(.MAX_ACCS(A), .QUEUE_LEN(QL), .MAX_ARGS(MAXA)) dut (.*);
  cmd_queue_bram #(.WORDS(A * QL)) u_mem (
    .clk, .a_en(q_en), .a_we(q_we), .a_addr(q_addr), .a_din(q_din), .a_dout(q_dout),
    .b_en, .b_we, .b_addr, .b_din, .b_dout);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_write(int a, int slot, logic [63:0] d);
    @(negedge clk); b_en = 1; b_we = 8'hFF; b_addr = 32'((a * QL + slot) * 8); b_din = d;
    @(negedge clk); b_en = 0; b_we = 0;
  endtask

  // write one command; nargs_hdr is what the header says, the controller
  // sends min(nargs_hdr, MAXA) argument pairs
  task automatic put_cmd(int a, logic [7:0] code, int nargs_hdr, int tag);
    logic [63:0] w[$];
    int na;
    na = (nargs_hdr > MAXA) ? MAXA : nargs_hdr;
    w.push_back({ENTRY_VALID, 40'h0, 8'(nargs_hdr), code});
    w.push_back(64'(tag));                  // task id
    w.push_back(64'hAAAA_0000 + 64'(tag));  // parent
    if (code == CMD_EXEC_PERIODIC) w.push_back({32'd250, 32'd4});
    for (int i = 0; i < na; i++) begin
      w.push_back({24'h0, 32'(i), 8'h12});
      w.push_back(64'(tag) << 32 | 64'(i));
    end
    for (int i = w.size() - 1; i >= 0; i--) host_write(a, (hwp[a] + i) % QL, w[i]);
    foreach (w[i]) exp_w[a].push_back(w[i]);
    exp_cmd_end[a].push_back(exp_w[a].size() + got[a]);
    hwp[a] = (hwp[a] + w.size()) % QL;
  endtask

  // accelerator side
  always @(posedge clk) begin
    tready <= ($urandom_range(0, 3) != 0);
    if (!rst && tvalid && tready) begin
      int a;
      a = int'(tdest);
      checks++;
      if (wait_free[a]) busy_violations++;
      if (exp_w[a].size() == 0 || tdata != exp_w[a][0]) begin
        failures++; $display("acc %0d word %0d: %h", a, got[a], tdata);
      end else void'(exp_w[a].pop_front());
      got[a]++;
      checks++;
      if (tlast != (exp_cmd_end[a].size() != 0 && got[a] == exp_cmd_end[a][0])) begin
        failures++; $display("tlast wrong acc %0d", a);
      end
      if (tlast) begin
        void'(exp_cmd_end[a].pop_front());
        cmds_got[a]++;
      end
    end
  end

  // per-accelerator completion: free odd-coded commands after a delay
  bit free_req [A];
  always @(negedge clk) begin
    acc_free_valid <= 1'b0;
    for (int g = 0; g < A; g++)
      if (free_req[g]) begin
        acc_free_valid <= 1'b1; acc_free_idx <= 2'(g); free_req[g] = 0;
        break;
      end
  end
  for (genvar g = 0; g < A; g++) begin : g_acc
    initial begin
      wait (!rst);
      forever begin
        @(posedge clk);
        if (tvalid && tready && tdest == g && tlast) begin
          #1;
          if (acc_busy[g]) begin
            wait_free[g] = 1;
            repeat ($urandom_range(3, 30)) @(posedge clk);
            wait_free[g] = 0;
            free_req[g] = 1;
          end else even_seen++;
        end
      end
    end
  end

  initial begin
    int total;
    b_en = 0; b_we = 0; b_addr = 0; b_din = 0; tready = 0; acc_free_valid = 0; acc_free_idx = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int batch = 0; batch < 3; batch++) begin
      for (int a = 0; a < A; a++) begin
        put_cmd(a, CMD_EXEC, (batch == 1) ? 0 : (a + batch) % 2, 100 * a + 10 * batch);            // 3 or 5 words
        put_cmd(a, 8'h02, 0, 100 * a + 10 * batch + 1);                         // 3 words, not busy
        put_cmd(a, CMD_EXEC_PERIODIC, (batch == 1) ? 9 : 1, 100 * a + 10 * batch + 2); // 6 or 10 words
      end
      for (int a = 0; a < A; a++) wait (exp_w[a].size() == 0);
      repeat (40) @(posedge clk);
    end
    total = 0;
    for (int a = 0; a < A; a++) begin
      checks++;
      if (cmds_got[a] != 9) begin failures++; $display("acc %0d got %0d commands", a, cmds_got[a]); end
    end
    checks++; if (busy_violations != 0) begin failures++; $display("%0d words sent to a busy accelerator", busy_violations); end
    checks++; if (even_seen != 4 * 3) begin failures++; $display("even-code commands left accelerator busy (%0d)", even_seen); end
    // every slot must have been cleared
    for (int i = 0; i < A * QL; i++) begin
      @(negedge clk); b_en = 1; b_we = 0; b_addr = 32'(i * 8);
      @(posedge clk); #1;
      checks++;
      if (b_dout != 0) begin failures++; $display("slot %0d not cleared", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
