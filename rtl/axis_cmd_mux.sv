// axis_cmd_mux: "Command from accelerators" stream multiplexer.
//
// Merges the output streams of N accelerators into the scheduler's
// cmdout_in stream. A round-robin arbiter picks one accelerator with a
// valid beat; the mux then stays locked to it until a beat with tlast has
// passed, so the words of one command are never mixed with another's. The
// winner's index is sent as tid. When several accelerators finish at once
// the others simply wait.
//
// The mux and tid tagging follow the specification; round-robin choice and
// tlast-based locking are this design's own. Timing: the first beat passes
// in the cycle it is granted; one beat per cycle after that.
module axis_cmd_mux #(
  parameter int N = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [N-1:0]         s_tvalid,
  output logic [N-1:0]         s_tready,
  input  logic [63:0]          s_tdata [N],
  input  logic [N-1:0]         s_tlast,
  output logic [$clog2(N)-1:0] m_tid,
  output logic [63:0]          m_tdata,
  output logic                 m_tvalid,
  input  logic                 m_tready
);
  localparam int IW = $clog2(N);

  logic          locked;
  logic [IW-1:0] cur, sel;
  logic [N-1:0]  gnt_unused;
  logic          any;

  rr_arbiter #(.N(N)) u_rr (
    .clk, .rst, .req(s_tvalid), .advance(!locked && any && m_tready),
    .gnt(gnt_unused), .gnt_idx(sel), .any);

  wire [IW-1:0] src = locked ? cur : sel;

  always_comb begin
    s_tready = '0;
    m_tvalid = locked ? s_tvalid[cur] : any;
    if (locked || any) s_tready[src] = m_tready;
  end
  assign m_tdata = s_tdata[src];
  assign m_tid   = src;

  always_ff @(posedge clk) begin
    if (rst) begin
      locked <= 1'b0;
      cur    <= '0;
    end else if (m_tvalid && m_tready) begin
      locked <= !s_tlast[src];
      cur    <= src;
    end
  end
endmodule
