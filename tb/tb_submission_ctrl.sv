// tb_submission_ctrl: four cores submit tasks at the same time through the
// Submission Controller to a Picos model that rejects every third attempt.
// Every sequence Picos sees must be well formed and come from one core
// (header count, SW ID, info and dependence addresses all derived from the
// same task), every task must be accepted exactly once, and replays must
// happen.
module tb_submission_ctrl;
  import fts_pkg::*;
  localparam int N = 4, T = 6;
  logic clk = 0, rst = 1;
  logic  [N-1:0] init_valid, init_ready, info_valid, info_ready, dep_valid, dep_ready;
  init_t [N-1:0] init_data;
  word_t [N-1:0] info_data;
  dep_t  [N-1:0] dep_data;
  logic picos_sub_valid, picos_sub_ready, picos_sub_last;
  logic picos_sub_resp_valid, picos_sub_resp_nack, resubmit;
  sub_beat_t picos_sub_beat;
  logic rdy_valid;
  ready_t rdy_data;
  int n_acc, n_nack, n_ret, n_bad;
  int checks = 0, failures = 0, n_resub = 0, n_seq = 0;
  int seen[word_t];

  submission_ctrl #(.N(N)) dut (.*);
  picos_model #(.NACK_EVERY(3)) u_picos (
    .clk, .rst, .sub_valid(picos_sub_valid), .sub_ready(picos_sub_ready),
    .sub_beat(picos_sub_beat), .sub_last(picos_sub_last),
    .resp_valid(picos_sub_resp_valid), .resp_nack(picos_sub_resp_nack),
    .rdy_valid, .rdy_ready(1'b1), .rdy_data,
    .ret_valid(1'b0), .ret_ready(), .ret_data('0), .ret_last(1'b0),
    .n_accepted(n_acc), .n_nacked(n_nack), .n_retired(n_ret), .n_bad_ret(n_bad));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t swid(int c, int k); return word_t'(int'((c + 1) * 256 + k)); endfunction
  function automatic int ndeps(int c, int k); return (c + k) % 5; endfunction
  function automatic word_t daddr(word_t id, int d); return (id << 16) + word_t'(d * 8); endfunction

  // one driver per core
  for (genvar c = 0; c < N; c++) begin : g_drv
    initial begin
      init_valid[c] = 0; info_valid[c] = 0; dep_valid[c] = 0;
      init_data[c] = '0; info_data[c] = '0; dep_data[c] = '0;
      wait (!rst);
      for (int k = 0; k < T; k++) begin
        word_t id;
        int nd;
        id = swid(c, k); nd = ndeps(c, k);
        init_valid[c] = 1; init_data[c] = '{sw_id: id, num_deps: 8'(nd)};
        @(posedge clk); while (!init_ready[c]) @(posedge clk); #1 init_valid[c] = 0;
        info_valid[c] = 1; info_data[c] = ~id;
        @(posedge clk); while (!info_ready[c]) @(posedge clk); #1 info_valid[c] = 0;
        for (int d = 0; d < nd; d++) begin
          dep_valid[c] = 1;
          dep_data[c] = '{dir: (d % 2 != 0) ? DEP_OUT : DEP_IN, two: 1'b0, addr1: '0, addr0: daddr(id, d)};
          @(posedge clk); while (!dep_ready[c]) @(posedge clk); #1 dep_valid[c] = 0;
        end
      end
    end
  end

  // Picos-side monitor
  sub_beat_t cur[$];
  always @(posedge clk) begin
    if (!rst && resubmit) n_resub++;
    if (!rst && rdy_valid) begin
      if (seen.exists(rdy_data.sw_id)) begin failures++; $display("task accepted twice"); end
      seen[rdy_data.sw_id] = 1;
    end
    if (!rst && picos_sub_valid && picos_sub_ready) begin
      cur.push_back(picos_sub_beat);
      if (picos_sub_last) begin
        word_t id;
        int nd;
        n_seq++;
        checks++;
        nd = int'(cur[0].data);
        id = cur[1].data;
        if (cur.size() != 3 + nd || cur[0].kind != BEAT_HDR || cur[1].kind != BEAT_SWID
            || cur[2].kind != BEAT_INFO || cur[2].data != ~id
            || nd != ndeps(int'(id >> 8) - 1, int'(id[7:0]))) begin
          failures++; $display("malformed sequence for %h", id);
        end else begin
          for (int d = 0; d < nd; d++) begin
            checks++;
            if (cur[3 + d].data != daddr(id, d) ||
                cur[3 + d].kind != ((d % 2 != 0) ? BEAT_DEP_OUT : BEAT_DEP_IN)) begin
              failures++; $display("interleaved/wrong dependence in %h", id);
            end
          end
        end
        cur.delete();
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wait (seen.num() == N * T);
    repeat (20) @(posedge clk);
    checks++; if (n_acc != N * T) begin failures++; $display("accepted %0d", n_acc); end
    checks++; if (n_nack == 0 || n_resub != n_nack) begin failures++; $display("nack %0d resub %0d", n_nack, n_resub); end
    checks++; if (n_seq != n_acc + n_nack) begin failures++; $display("sequences %0d", n_seq); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
