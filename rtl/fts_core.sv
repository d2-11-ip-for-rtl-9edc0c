// fts_core: Fast Task Scheduler (FTS) IP core.
//
// Schedules tasks written by a host into accelerators. The host writes
// commands into the command-in queue (a BRAM, one sub-queue per
// accelerator); the Command in controller sends each command, in order, to
// its accelerator over the cmdin_out AXI-Stream master once that
// accelerator is idle. Accelerators answer on the cmdout_in AXI-Stream
// slave with a Finished Task command; the Command out controller writes it
// into the command-out queue for the host and tells Command in that the
// accelerator is idle again.
//
// Ports are those of the specification: clk, active-low synchronous rstn,
// two AXI-Stream ports and two BRAM master ports (en, dout, din, we, addr,
// clk, rst). MAX_ACC_TYPES is kept for interface compatibility; the
// per-accelerator sub-queue scheduling described does not use it.
// Timing: see cmd_in and cmd_out.
module fts_core
  import fts_pkg::*;
#(
  parameter int MAX_ACCS          = 16,
  parameter int MAX_ACC_TYPES     = 16,
  parameter int CMDIN_QUEUE_LEN   = 64,
  parameter int CMDOUT_QUEUE_LEN  = 64,
  parameter int MAX_ARGS_PER_TASK = 15
) (
  input  logic        clk,
  input  logic        rstn,
  // cmdout_in: AXI-Stream slave, commands from accelerators
  input  logic [$clog2(MAX_ACCS)-1:0] cmdout_in_tid,
  input  logic [63:0] cmdout_in_tdata,
  input  logic        cmdout_in_tvalid,
  output logic        cmdout_in_tready,
  // cmdin_out: AXI-Stream master, commands to accelerators
  output logic [$clog2(MAX_ACCS)-1:0] cmdin_out_tdest,
  output logic [63:0] cmdin_out_tdata,
  output logic        cmdin_out_tlast,
  output logic        cmdin_out_tvalid,
  input  logic        cmdin_out_tready,
  // cmdin_queue: BRAM master
  output logic        cmdin_queue_en,
  input  logic [63:0] cmdin_queue_dout,
  output logic [63:0] cmdin_queue_din,
  output logic [7:0]  cmdin_queue_we,
  output logic [31:0] cmdin_queue_addr,
  output logic        cmdin_queue_clk,
  output logic        cmdin_queue_rst,
  // cmdout_queue: BRAM master
  output logic        cmdout_queue_en,
  input  logic [63:0] cmdout_queue_dout,
  output logic [63:0] cmdout_queue_din,
  output logic [7:0]  cmdout_queue_we,
  output logic [31:0] cmdout_queue_addr,
  output logic        cmdout_queue_clk,
  output logic        cmdout_queue_rst,
  // accelerator state, for observation
  output logic [MAX_ACCS-1:0] acc_busy
);
  localparam int AI = $clog2(MAX_ACCS);

  logic          rst;
  logic          free_v;
  logic [AI-1:0] free_idx;

  assign rst = !rstn;
  assign cmdin_queue_clk  = clk;
  assign cmdout_queue_clk = clk;
  assign cmdin_queue_rst  = rst;
  assign cmdout_queue_rst = rst;

  cmd_in #(.MAX_ACCS(MAX_ACCS), .QUEUE_LEN(CMDIN_QUEUE_LEN), .MAX_ARGS(MAX_ARGS_PER_TASK)) u_in (
    .clk, .rst,
    .q_en(cmdin_queue_en), .q_we(cmdin_queue_we), .q_addr(cmdin_queue_addr),
    .q_din(cmdin_queue_din), .q_dout(cmdin_queue_dout),
    .tdest(cmdin_out_tdest), .tdata(cmdin_out_tdata), .tlast(cmdin_out_tlast),
    .tvalid(cmdin_out_tvalid), .tready(cmdin_out_tready),
    .acc_free_valid(free_v), .acc_free_idx(free_idx), .acc_busy);

  cmd_out #(.MAX_ACCS(MAX_ACCS), .QUEUE_LEN(CMDOUT_QUEUE_LEN)) u_out (
    .clk, .rst,
    .tid(cmdout_in_tid), .tdata(cmdout_in_tdata), .tvalid(cmdout_in_tvalid),
    .tready(cmdout_in_tready),
    .q_en(cmdout_queue_en), .q_we(cmdout_queue_we), .q_addr(cmdout_queue_addr),
    .q_din(cmdout_queue_din), .q_dout(cmdout_queue_dout),
    .acc_free_valid(free_v), .acc_free_idx(free_idx));
endmodule
