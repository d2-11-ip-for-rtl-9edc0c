// tb_resub_handler: sends submission sequences through the Resubmission
// Handler to a scripted Picos that rejects some attempts. Checks that every
// attempt Picos sees is the full original sequence, that a rejected one is
// replayed (resubmit pulse) until accepted, and that input is held off
// while an answer is pending.
module tb_resub_handler;
  import fts_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  logic resp_valid, resp_nack, resubmit;
  sub_beat_t in_beat, out_beat;
  int checks = 0, failures = 0, n_resub = 0;
  sub_beat_t seq[$], got[$];

  resub_handler dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && resubmit) n_resub++;

  // Picos side: collect, then answer (nack the first `nacks` attempts)
  int nacks;
  task automatic picos_attempt(input bit nack);
    got.delete();
    forever begin
      out_ready = ($urandom_range(0, 2) != 0);
      #1;
      if (out_valid && out_ready) begin
        got.push_back(out_beat);
        if (out_last) begin @(posedge clk); #1; break; end
      end
      @(posedge clk); #1;
    end
    out_ready = 0;
    checks++;
    if (got.size() != seq.size()) begin failures++; $display("len %0d vs %0d", got.size(), seq.size()); end
    else foreach (seq[i]) if (got[i] != seq[i]) begin failures++; $display("beat %0d differs", i); end
    repeat ($urandom_range(0, 3)) begin
      checks++;
      if (in_ready) begin failures++; $display("input accepted while waiting"); end
      @(posedge clk); #1;
    end
    resp_valid = 1; resp_nack = nack;
    @(posedge clk); #1;
    resp_valid = 0; resp_nack = 0;
  endtask

  initial begin
    in_valid = 0; in_beat = '0; in_last = 0; out_ready = 0; resp_valid = 0; resp_nack = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int s = 0; s < 20; s++) begin
      int len;
      len = $urandom_range(3, MAX_SEQ);
      nacks = s % 3;
      seq.delete();
      for (int b = 0; b < len; b++) seq.push_back('{kind: beat_kind_e'(b == 0 ? 0 : 3), data: 64'($urandom) ^ 64'(s << 40)});
      fork
        begin
          for (int b = 0; b < len; b++) begin
            in_valid = 1; in_beat = seq[b]; in_last = (b == len - 1);
            @(posedge clk); while (!in_ready) @(posedge clk);
            #1;
          end
          in_valid = 0; in_last = 0;
        end
        begin
          for (int a = 0; a <= nacks; a++) picos_attempt(a < nacks);
        end
      join
    end
    checks++;
    if (n_resub != 0 + 1 + 2 + 0 + 1 + 2 + 0 + 1 + 2 + 0 + 1 + 2 + 0 + 1 + 2 + 0 + 1 + 2 + 0 + 1) begin
      failures++; $display("resubmit count %0d", n_resub);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
