// axis_cmd_demux: "Command to accelerators" stream demultiplexer.
//
// Routes each beat of the scheduler's cmdin_out stream to the accelerator
// named by tdest: only that accelerator's tvalid rises, and the
// scheduler's tready is that accelerator's tready. A tdest beyond N is
// dropped (tready high) so the stream can never hang. Purely
// combinational; the port set follows the specification, the routing
// logic is this design's own.
module axis_cmd_demux #(
  parameter int N = 16
) (
  input  logic [$clog2(N)-1:0] s_tdest,
  input  logic [63:0]          s_tdata,
  input  logic                 s_tlast,
  input  logic                 s_tvalid,
  output logic                 s_tready,
  output logic [N-1:0]         m_tvalid,
  input  logic [N-1:0]         m_tready,
  output logic [63:0]          m_tdata,
  output logic                 m_tlast
);
  wire in_range = (32'(s_tdest) < N);

  always_comb begin
    m_tvalid = '0;
    if (in_range) m_tvalid[s_tdest] = s_tvalid;
  end
  assign s_tready = in_range ? m_tready[s_tdest] : 1'b1;
  assign m_tdata  = s_tdata;
  assign m_tlast  = s_tlast;
endmodule
