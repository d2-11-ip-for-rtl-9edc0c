// tb_cmd_out: Command out controller with a queue memory of 4 accelerators
// x 8 slots. Accelerators send two-word commands (Finished Task 0x03, and
// one other code). Checks: each lands in its accelerator's sub-queue at
// the write pointer, task id in the second slot and header with valid byte
// 0x80; the controller waits while the host still holds the slot (valid
// byte set) and writes only after the host clears it; acc_free pulses once
// per Finished Task with the right index and never for other codes; the
// write pointer wraps.
module tb_cmd_out;
  import fts_pkg::*;
  localparam int A = 4, QL = 8;
  logic clk = 0, rst = 1;
  logic [1:0] tid, acc_free_idx;
  logic [63:0] tdata;
  logic tvalid, tready, acc_free_valid;
  logic q_en, b_en;
  logic [7:0] q_we, b_we;
  logic [31:0] q_addr, b_addr;
  logic [63:0] q_din, q_dout, b_din, b_dout;
  int checks = 0, failures = 0;
  int frees [A];
  int sent_fin [A];

  cmd_out #(.MAX_ACCS(A), .QUEUE_LEN(QL)) dut (.*);
  cmd_queue_bram #(.WORDS(A * QL)) u_mem (
    .clk, .a_en(q_en), .a_we(q_we), .a_addr(q_addr), .a_din(q_din), .a_dout(q_dout),
    .b_en, .b_we, .b_addr, .b_din, .b_dout);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && acc_free_valid) frees[acc_free_idx]++;

  task automatic send(int a, logic [7:0] code, logic [63:0] tsk);
    @(negedge clk); tvalid = 1; tid = 2'(a); tdata = {ENTRY_VALID, 48'h0, code};
    @(posedge clk); while (!tready) @(posedge clk);
    @(negedge clk); tdata = tsk;
    @(posedge clk); while (!tready) @(posedge clk);
    @(negedge clk); tvalid = 0;
    if (code == CMD_FINISHED) sent_fin[a]++;
  endtask

  task automatic host_rd(int a, int slot, output logic [63:0] d);
    @(negedge clk); b_en = 1; b_we = 0; b_addr = 32'((a * QL + slot) * 8);
    @(negedge clk); b_en = 0; d = b_dout;
  endtask
  task automatic host_wr(int a, int slot, logic [63:0] d);
    @(negedge clk); b_en = 1; b_we = 8'hFF; b_addr = 32'((a * QL + slot) * 8); b_din = d;
    @(negedge clk); b_en = 0; b_we = 0;
  endtask

  task automatic expect_entry(int a, int slot, logic [7:0] code, logic [63:0] tsk);
    logic [63:0] h, t;
    host_rd(a, slot, h); host_rd(a, (slot + 1) % QL, t);
    checks++;
    if (h != {ENTRY_VALID, 48'h0, code} || t != tsk) begin
      failures++; $display("acc %0d slot %0d: %h %h", a, slot, h, t);
    end
    host_wr(a, slot, 64'h0);   // host consumes it
  endtask

  initial begin
    logic [63:0] d;
    tvalid = 0; tid = 0; tdata = 0; b_en = 0; b_we = 0; b_addr = 0; b_din = 0;
    for (int i = 0; i < A * QL; i++) host_wr(i / QL, i % QL, 64'h0);
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // 5 rounds: 4 commands per accelerator per round = 8 slots -> wraps every round
    for (int r = 0; r < 5; r++) begin
      for (int k = 0; k < 4; k++)
        for (int a = 0; a < A; a++)
          send(a, (k == 2 && a == 1) ? 8'h04 : CMD_FINISHED, 64'(1000 * r + 100 * a + k));
      repeat (5) @(posedge clk);
      for (int a = 0; a < A; a++)
        for (int k = 0; k < 4; k++)
          expect_entry(a, (2 * k) % QL, (k == 2 && a == 1) ? 8'h04 : CMD_FINISHED, 64'(1000 * r + 100 * a + k));
    end
    // host keeps slot 0 of accelerator 2 occupied: the controller must wait
    host_wr(2, 0, {ENTRY_VALID, 56'h77});
    fork send(2, CMD_FINISHED, 64'h5150); join_none
    repeat (40) @(posedge clk);
    host_rd(2, 1, d);
    checks++; if (d == 64'h5150) begin failures++; $display("overwrote an occupied slot"); end
    checks++; if (frees[2] != sent_fin[2]) ; else begin failures++; $display("freed before writing"); end
    host_wr(2, 0, 64'h0);
    repeat (10) @(posedge clk);
    expect_entry(2, 0, CMD_FINISHED, 64'h5150);
    for (int a = 0; a < A; a++) begin
      checks++;
      if (frees[a] != sent_fin[a]) begin failures++; $display("acc %0d freed %0d times, %0d finished", a, frees[a], sent_fin[a]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
