// tb_rr_arbiter: checks the round-robin arbiter against a reference model.
// Random request patterns with random acceptance; the expected winner is
// the first requester at or after a pointer kept by the testbench, which
// moves past the winner only when the grant is accepted.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst = 1;
  logic [N-1:0] req, gnt;
  logic advance, any;
  logic [$clog2(N)-1:0] gnt_idx;
  int checks = 0, failures = 0;
  int ptr = 0, exp_idx;
  int served [N];

  rr_arbiter #(.N(N)) dut (.clk, .rst, .req, .advance, .gnt, .gnt_idx, .any);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; advance = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 2000; t++) begin
      req = N'($urandom);
      if (t < 20) req = '1;           // all requesting: strict rotation
      advance = (t < 20) ? 1'b1 : ($urandom_range(0, 2) != 0);
      #1;
      exp_idx = -1;
      for (int k = 0; k < N; k++)
        if (exp_idx < 0 && req[(ptr + k) % N]) exp_idx = (ptr + k) % N;
      checks++;
      if (any !== (req != 0)) begin failures++; $display("any wrong t=%0d", t); end
      if (exp_idx >= 0) begin
        checks++;
        if (int'(gnt_idx) != exp_idx || gnt != (N'(1) << exp_idx)) begin
          failures++;
          $display("t=%0d req=%b ptr=%0d exp=%0d got=%0d gnt=%b", t, req, ptr, exp_idx, gnt_idx, gnt);
        end
        if (t < 20) begin
          checks++;
          if (exp_idx != t % N) begin failures++; $display("rotation broken t=%0d", t); end
        end
        if (advance) begin ptr = (exp_idx + 1) % N; served[exp_idx]++; end
      end else begin
        checks++;
        if (gnt != 0) failures++;
      end
      @(posedge clk); #1;
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (served[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
