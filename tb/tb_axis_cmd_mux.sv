// tb_axis_cmd_mux: four sources send two- or three-beat packets at random
// times; checks that every packet arrives whole and uninterrupted with the
// right tid, that no beat is lost, and that simultaneous senders are all
// served.
module tb_axis_cmd_mux;
  localparam int N = 4, P = 30;
  logic clk = 0, rst = 1;
  logic [N-1:0] s_tvalid, s_tready, s_tlast;
  logic [63:0] s_tdata [N];
  logic [$clog2(N)-1:0] m_tid;
  logic [63:0] m_tdata;
  logic m_tvalid, m_tready;
  int checks = 0, failures = 0;
  int pkt [N], bt [N], plen [N];
  int got_pkts [N];
  int cur_src = -1, cur_beat = 0, contention = 0;

  axis_cmd_mux #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sources: data = {src, packet, beat}; length 2 or 3
  always_comb for (int i = 0; i < N; i++) begin
    s_tdata[i] = {16'(i), 16'(pkt[i]), 32'(bt[i])};
    s_tlast[i] = (bt[i] == plen[i] - 1);
  end
  always @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) begin pkt[i] <= 0; bt[i] <= 0; plen[i] <= 2 + i % 2; s_tvalid[i] <= 0; end
    end else begin
      if ($countones(s_tvalid) > 1) contention++;
      for (int i = 0; i < N; i++) begin
        if (s_tvalid[i] && s_tready[i]) begin
          if (s_tlast[i]) begin bt[i] <= 0; pkt[i] <= pkt[i] + 1; plen[i] <= $urandom_range(2, 3); end
          else bt[i] <= bt[i] + 1;
        end
        // a source keeps tvalid while mid-packet (AXI-Stream rule)
        if (!(s_tvalid[i] && !(s_tready[i] && s_tlast[i])))
          s_tvalid[i] <= (pkt[i] + ((s_tvalid[i] && s_tready[i] && s_tlast[i]) ? 1 : 0) < P) && ($urandom_range(0, 2) == 0);
      end
    end
    m_tready <= ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) if (!rst && m_tvalid && m_tready) begin
    int src;
    src = int'(m_tdata[63:48]);
    checks++;
    if (src != int'(m_tid)) begin failures++; $display("tid %0d for data of %0d", m_tid, src); end
    if (cur_src >= 0 && src != cur_src) begin failures++; $display("packets interleaved"); end
    if (int'(m_tdata[31:0]) != cur_beat || int'(m_tdata[47:32]) != got_pkts[src]) begin
      failures++; $display("beat lost src=%0d", src);
    end
    if (s_tlast[src]) begin cur_src = -1; cur_beat = 0; got_pkts[src]++; end
    else begin cur_src = src; cur_beat++; end
  end

  initial begin
    m_tready = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wait (got_pkts[0] == P && got_pkts[1] == P && got_pkts[2] == P && got_pkts[3] == P);
    checks++; if (contention == 0) begin failures++; $display("no contention seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
