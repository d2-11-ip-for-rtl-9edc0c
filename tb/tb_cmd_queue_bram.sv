// tb_cmd_queue_bram: random byte-masked writes and reads on both ports of
// the queue memory, checked against a word array kept by the testbench,
// including one-cycle read latency and reads of data written by the other
// port.
module tb_cmd_queue_bram;
  localparam int WORDS = 64;
  logic clk = 0;
  logic a_en, b_en;
  logic [7:0] a_we, b_we;
  logic [31:0] a_addr, b_addr;
  logic [63:0] a_din, b_din, a_dout, b_dout;
  logic [63:0] model [WORDS];
  int checks = 0, failures = 0;

  cmd_queue_bram #(.WORDS(WORDS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] merge(logic [63:0] old, logic [63:0] d, logic [7:0] we);
    for (int i = 0; i < 8; i++) if (we[i]) old[i*8 +: 8] = d[i*8 +: 8];
    return old;
  endfunction

  initial begin
    logic [63:0] exp_a, exp_b;
    bit rd_a, rd_b;
    a_en = 0; b_en = 0; a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_din = 0; b_din = 0;
    // initialise through port B
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); b_en = 1; b_we = 8'hFF; b_addr = 32'(i * 8); b_din = {32'(i), 32'hC0DE};
      model[i] = b_din;
    end
    @(negedge clk); b_en = 0;
    for (int t = 0; t < 3000; t++) begin
      int ia, ib;
      @(negedge clk);
      ia = $urandom_range(0, WORDS - 1);
      ib = $urandom_range(0, WORDS - 1);
      if (ib == ia) ib = (ia + 1) % WORDS;
      a_en = 1'($urandom_range(0, 1)); b_en = 1'($urandom_range(0, 1));
      a_we = ($urandom_range(0, 1) != 0) ? 8'($urandom) : 8'h00;
      b_we = ($urandom_range(0, 1) != 0) ? 8'($urandom) : 8'h00;
      a_addr = 32'(ia * 8); b_addr = 32'(ib * 8);
      a_din = {$urandom, $urandom}; b_din = {$urandom, $urandom};
      rd_a = a_en; rd_b = b_en;
      exp_a = model[ia]; exp_b = model[ib];   // read-first: old data
      if (a_en) model[ia] = merge(model[ia], a_din, a_we);
      if (b_en) model[ib] = merge(model[ib], b_din, b_we);
      @(posedge clk); #1;
      if (rd_a) begin checks++; if (a_dout != exp_a) begin failures++; $display("A word %0d: %h exp %h", ia, a_dout, exp_a); end end
      if (rd_b) begin checks++; if (b_dout != exp_b) begin failures++; $display("B word %0d", ib); end end
    end
    // final sweep through port A
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); a_en = 1; a_we = 0; a_addr = 32'(i * 8); b_en = 0;
      @(posedge clk); #1;
      checks++; if (a_dout != model[i]) begin failures++; $display("sweep %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
