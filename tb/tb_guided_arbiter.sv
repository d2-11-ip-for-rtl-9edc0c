// tb_guided_arbiter: three cores each stream numbered beats; the testbench
// offers random cores with random lengths. Checks that exactly the offered
// number of beats passes, all from the offered core and in order, that
// out_last is on the final one, that other cores see no ready, and that no
// new offer is accepted mid-sequence.
module tb_guided_arbiter;
  import fts_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst = 1;
  logic offer_valid, sel_accept, out_valid, out_ready, out_last;
  logic [$clog2(N)-1:0] offer_idx;
  logic [SEQ_LEN_W-1:0] offer_len;
  logic [N-1:0] in_valid, in_ready;
  sub_beat_t [N-1:0] in_beat;
  sub_beat_t out_beat;
  int checks = 0, failures = 0;
  int seqno [N];

  guided_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sources: beat data = {core, sequence number}
  always_comb
    for (int i = 0; i < N; i++) in_beat[i] = '{kind: BEAT_DEP_IN, data: {32'(i), 32'(seqno[i])}};
  always @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (rst) seqno[i] <= 0;
      else if (in_valid[i] && in_ready[i]) seqno[i] <= seqno[i] + 1;
      in_valid[i] <= ($urandom_range(0, 3) != 0);
    end
    out_ready <= ($urandom_range(0, 3) != 0);
  end

  initial begin
    int core, len, got, exp_seq;
    offer_valid = 0; offer_idx = 0; offer_len = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 200; t++) begin
      core = $urandom_range(0, N - 1);
      len  = $urandom_range(1, MAX_SEQ);
      offer_valid = 1; offer_idx = core[$clog2(N)-1:0]; offer_len = SEQ_LEN_W'(len);
      #1;
      checks++;
      if (!sel_accept) begin failures++; $display("idle arbiter did not accept"); end
      exp_seq = seqno[core];
      @(posedge clk); #1;
      offer_valid = 1; offer_idx = $bits(offer_idx)'((core + 1) % N);   // competing offer must be ignored
      got = 0;
      while (got < len) begin
        #1;
        if (sel_accept) begin failures++; $display("accepted mid-sequence"); end
        for (int i = 0; i < N; i++)
          if (i != core && in_ready[i]) begin failures++; $display("ready to wrong core"); end
        if (out_valid && out_ready) begin
          checks++;
          if (out_beat.data != {32'(core), 32'(exp_seq + got)}) begin
            failures++; $display("bad beat %h", out_beat.data);
          end
          checks++;
          if (out_last != (got == len - 1)) begin failures++; $display("bad last"); end
          got++;
        end
        @(posedge clk);
      end
      #1 offer_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
