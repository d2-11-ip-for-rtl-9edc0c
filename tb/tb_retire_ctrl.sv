// tb_retire_ctrl: cores offer retirements, often several in one cycle.
// Checks that exactly one offer is accepted per idle cycle, the others
// retry, the round-robin order rotates, each accepted retirement produces
// the three Picos packets (ID, core, 0 with last) and no retirement is lost
// or duplicated. Also checks the collision flag.
module tb_retire_ctrl;
  import fts_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst = 1;
  logic [N-1:0] ret_valid, ret_ready;
  picos_id_t [N-1:0] ret_id;
  logic picos_ret_valid, picos_ret_ready, picos_ret_last, collision;
  word_t picos_ret_data;
  int checks = 0, failures = 0, n_coll = 0, beat = 0, n_out = 0;
  int pending[N];
  picos_id_t acc_id;
  int acc_core;
  picos_id_t exp_q[$];
  int exp_core[$];

  retire_ctrl #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cores: each retires 10 tasks, ids core*100+k, retrying until accepted
  always @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) pending[i] <= 0;
    end else begin
      int nv;
      nv = 0;
      for (int i = 0; i < N; i++) begin
        if (ret_valid[i]) nv++;
        if (ret_valid[i] && ret_ready[i]) begin
          exp_q.push_back(ret_id[i]); exp_core.push_back(i);
          pending[i] <= pending[i] + 1;
        end
      end
      checks++;
      if ($countones(ret_ready) > 1 || (ret_ready & ~ret_valid) != 0) begin failures++; $display("bad ready"); end
      if (nv > 1) begin
        n_coll++;
        checks++;
        if (!collision) failures++;
      end
    end
  end
  always_comb for (int i = 0; i < N; i++) begin
    ret_valid[i] = !rst && pending[i] < 10;
    ret_id[i] = picos_id_t'(i * 100 + pending[i] + 1);
  end

  always @(posedge clk) begin
    picos_ret_ready <= ($urandom_range(0, 3) != 0);
    if (!rst && picos_ret_valid && picos_ret_ready) begin
      checks++;
      case (beat)
        0: if (picos_ret_data != word_t'(exp_q[0]) || picos_ret_last) begin failures++; $display("beat0 %h", picos_ret_data); end
        1: if (picos_ret_data != word_t'(exp_core[0]) || picos_ret_last) begin failures++; $display("beat1"); end
        default: begin
          if (picos_ret_data != 0 || !picos_ret_last) begin failures++; $display("beat2"); end
          void'(exp_q.pop_front()); void'(exp_core.pop_front()); n_out++;
        end
      endcase
      beat = (beat == 2) ? 0 : beat + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wait (n_out == N * 10);
    checks++; if (n_coll == 0) begin failures++; $display("no collisions seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
