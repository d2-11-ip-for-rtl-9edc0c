// tb_axis_cmd_demux: random tdest/valid/ready patterns; checks that only
// the addressed accelerator sees tvalid, that tready comes from it, that
// data and tlast reach the outputs, and that an out-of-range tdest is
// dropped.
module tb_axis_cmd_demux;
  localparam int N = 6;
  logic [$clog2(N)-1:0] s_tdest;
  logic [63:0] s_tdata, m_tdata;
  logic s_tlast, s_tvalid, s_tready, m_tlast;
  logic [N-1:0] m_tvalid, m_tready;
  int checks = 0, failures = 0;

  axis_cmd_demux #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      s_tdest = $bits(s_tdest)'($urandom_range(0, 7));
      s_tdata = {$urandom, $urandom}; s_tlast = 1'($urandom_range(0, 1));
      s_tvalid = 1'($urandom_range(0, 1)); m_tready = N'($urandom);
      #1;
      checks++;
      if (int'(s_tdest) < N) begin
        if (m_tvalid != (s_tvalid ? (N'(1) << s_tdest) : '0) || s_tready != m_tready[s_tdest]
            || m_tdata != s_tdata || m_tlast != s_tlast) begin
          failures++; $display("t=%0d dest=%0d valid=%b", t, s_tdest, m_tvalid);
        end
      end else if (m_tvalid != 0 || !s_tready) begin
        failures++; $display("out of range not dropped");
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
