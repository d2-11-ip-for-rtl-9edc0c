// fts_system_top: hardware task scheduling, two designs side by side.
//
// 1) RISC-V many-core integration: one FTS Manager shared by NUM_CORES
//    FTS Delegates, one per core. Each Delegate's RoCC command/response
//    port is brought out (the Rocket cores are not part of this RTL), and
//    so are the FTS Manager's three queues to the Picos dependence manager
//    (submission with ack/nack, ready, retirement).
// 2) Standalone Fast Task Scheduler IP: the FTS core with its command-in
//    and command-out queue memories and the stream demultiplexer/
//    multiplexer towards MAX_ACCS accelerators. The host side of both queue
//    memories (BRAM port B) and the accelerators' streams are brought out.
//
// Defaults are those of the specification: 30 cores, 16 accelerators,
// 64-entry sub-queues, up to 15 task arguments. All logic runs on clk;
// rst is active high for design 1, rstn active low for design 2. The upper
// 32 bits of picos_ret_data are constant zero (32-bit Picos IDs).
module fts_system_top
  import fts_pkg::*;
#(
  parameter int NUM_CORES         = 30,
  parameter int MAX_ACCS          = 16,
  parameter int MAX_ACC_TYPES     = 16,
  parameter int CMDIN_QUEUE_LEN   = 64,
  parameter int CMDOUT_QUEUE_LEN  = 64,
  parameter int MAX_ARGS_PER_TASK = 15
) (
  input  logic clk,
  input  logic rst,
  input  logic rstn,
  // ---- design 1: per-core RoCC ports ----
  input  logic  [NUM_CORES-1:0] cmd_valid,
  output logic  [NUM_CORES-1:0] cmd_ready,
  input  logic  [6:0]           cmd_funct7 [NUM_CORES],
  input  logic  [4:0]           cmd_rd     [NUM_CORES],
  input  logic  [NUM_CORES-1:0] cmd_xd,
  input  word_t                 cmd_rs1    [NUM_CORES],
  input  word_t                 cmd_rs2    [NUM_CORES],
  output logic  [NUM_CORES-1:0] resp_valid,
  input  logic  [NUM_CORES-1:0] resp_ready,
  output logic  [4:0]           resp_rd    [NUM_CORES],
  output word_t                 resp_data  [NUM_CORES],
  output logic  [NUM_CORES-1:0] core_busy,
  // ---- design 1: Picos queues ----
  output logic      picos_sub_valid,
  input  logic      picos_sub_ready,
  output sub_beat_t picos_sub_beat,
  output logic      picos_sub_last,
  input  logic      picos_sub_resp_valid,
  input  logic      picos_sub_resp_nack,
  input  logic      picos_rdy_valid,
  output logic      picos_rdy_ready,
  input  ready_t    picos_rdy_data,
  output logic      picos_ret_valid,
  input  logic      picos_ret_ready,
  output word_t     picos_ret_data,
  output logic      picos_ret_last,
  output logic      resubmit,
  output logic      ret_collision,
  // ---- design 2: host side of the command queues ----
  input  logic        host_in_en,
  input  logic [7:0]  host_in_we,
  input  logic [31:0] host_in_addr,
  input  logic [63:0] host_in_din,
  output logic [63:0] host_in_dout,
  input  logic        host_out_en,
  input  logic [7:0]  host_out_we,
  input  logic [31:0] host_out_addr,
  input  logic [63:0] host_out_din,
  output logic [63:0] host_out_dout,
  // ---- design 2: accelerator streams ----
  output logic [MAX_ACCS-1:0] acc_in_tvalid,
  input  logic [MAX_ACCS-1:0] acc_in_tready,
  output logic [63:0]         acc_in_tdata,
  output logic                acc_in_tlast,
  input  logic [MAX_ACCS-1:0] acc_out_tvalid,
  output logic [MAX_ACCS-1:0] acc_out_tready,
  input  logic [63:0]         acc_out_tdata [MAX_ACCS],
  input  logic [MAX_ACCS-1:0] acc_out_tlast,
  output logic [MAX_ACCS-1:0] acc_busy
);
  localparam int N  = NUM_CORES;
  localparam int AI = $clog2(MAX_ACCS);

  // ================= design 1 =================
  logic      [N-1:0] init_valid, init_ready, info_valid, info_ready;
  logic      [N-1:0] dep_valid, dep_ready, wf_valid, wf_ready;
  logic      [N-1:0] ret_valid, ret_ready, rdy_valid, rdy_ready;
  init_t     [N-1:0] init_data;
  word_t     [N-1:0] info_data;
  dep_t      [N-1:0] dep_data;
  picos_id_t [N-1:0] ret_id;
  ready_t            rdy_data;

  for (genvar i = 0; i < N; i++) begin : g_tile
    fts_delegate u_delegate (
      .clk, .rst,
      .cmd_valid(cmd_valid[i]), .cmd_ready(cmd_ready[i]), .cmd_funct7(cmd_funct7[i]),
      .cmd_rd(cmd_rd[i]), .cmd_xd(cmd_xd[i]), .cmd_rs1(cmd_rs1[i]), .cmd_rs2(cmd_rs2[i]),
      .resp_valid(resp_valid[i]), .resp_ready(resp_ready[i]), .resp_rd(resp_rd[i]),
      .resp_data(resp_data[i]), .busy(core_busy[i]),
      .init_valid(init_valid[i]), .init_ready(init_ready[i]), .init_data(init_data[i]),
      .info_valid(info_valid[i]), .info_ready(info_ready[i]), .info_data(info_data[i]),
      .dep_valid(dep_valid[i]), .dep_ready(dep_ready[i]), .dep_data(dep_data[i]),
      .wf_valid(wf_valid[i]), .wf_ready(wf_ready[i]),
      .ret_valid(ret_valid[i]), .ret_ready(ret_ready[i]), .ret_id(ret_id[i]),
      .rdy_valid(rdy_valid[i]), .rdy_ready(rdy_ready[i]), .rdy_data(rdy_data));
  end

  fts_manager #(.N(N)) u_manager (
    .clk, .rst,
    .init_valid, .init_ready, .init_data,
    .info_valid, .info_ready, .info_data,
    .dep_valid, .dep_ready, .dep_data,
    .wf_valid, .wf_ready, .ret_valid, .ret_ready, .ret_id,
    .rdy_valid, .rdy_ready, .rdy_data,
    .picos_sub_valid, .picos_sub_ready, .picos_sub_beat, .picos_sub_last,
    .picos_sub_resp_valid, .picos_sub_resp_nack,
    .picos_rdy_valid, .picos_rdy_ready, .picos_rdy_data,
    .picos_ret_valid, .picos_ret_ready, .picos_ret_data, .picos_ret_last,
    .resubmit, .ret_collision);

  // ================= design 2 =================
  logic          qi_en, qi_clk_unused, qi_rst_unused;
  logic [7:0]    qi_we;
  logic [31:0]   qi_addr;
  logic [63:0]   qi_din, qi_dout;
  logic          qo_en, qo_clk_unused, qo_rst_unused;
  logic [7:0]    qo_we;
  logic [31:0]   qo_addr;
  logic [63:0]   qo_din, qo_dout;
  logic [AI-1:0] ci_tdest, co_tid;
  logic [63:0]   ci_tdata, co_tdata;
  logic          ci_tlast, ci_tvalid, ci_tready, co_tvalid, co_tready;

  fts_core #(
    .MAX_ACCS(MAX_ACCS), .MAX_ACC_TYPES(MAX_ACC_TYPES),
    .CMDIN_QUEUE_LEN(CMDIN_QUEUE_LEN), .CMDOUT_QUEUE_LEN(CMDOUT_QUEUE_LEN),
    .MAX_ARGS_PER_TASK(MAX_ARGS_PER_TASK)
  ) u_fts (
    .clk, .rstn,
    .cmdout_in_tid(co_tid), .cmdout_in_tdata(co_tdata),
    .cmdout_in_tvalid(co_tvalid), .cmdout_in_tready(co_tready),
    .cmdin_out_tdest(ci_tdest), .cmdin_out_tdata(ci_tdata), .cmdin_out_tlast(ci_tlast),
    .cmdin_out_tvalid(ci_tvalid), .cmdin_out_tready(ci_tready),
    .cmdin_queue_en(qi_en), .cmdin_queue_dout(qi_dout), .cmdin_queue_din(qi_din),
    .cmdin_queue_we(qi_we), .cmdin_queue_addr(qi_addr),
    .cmdin_queue_clk(qi_clk_unused), .cmdin_queue_rst(qi_rst_unused),
    .cmdout_queue_en(qo_en), .cmdout_queue_dout(qo_dout), .cmdout_queue_din(qo_din),
    .cmdout_queue_we(qo_we), .cmdout_queue_addr(qo_addr),
    .cmdout_queue_clk(qo_clk_unused), .cmdout_queue_rst(qo_rst_unused),
    .acc_busy);

  cmd_queue_bram #(.WORDS(MAX_ACCS * CMDIN_QUEUE_LEN)) u_cmdin_queue (
    .clk,
    .a_en(qi_en), .a_we(qi_we), .a_addr(qi_addr), .a_din(qi_din), .a_dout(qi_dout),
    .b_en(host_in_en), .b_we(host_in_we), .b_addr(host_in_addr), .b_din(host_in_din),
    .b_dout(host_in_dout));

  cmd_queue_bram #(.WORDS(MAX_ACCS * CMDOUT_QUEUE_LEN)) u_cmdout_queue (
    .clk,
    .a_en(qo_en), .a_we(qo_we), .a_addr(qo_addr), .a_din(qo_din), .a_dout(qo_dout),
    .b_en(host_out_en), .b_we(host_out_we), .b_addr(host_out_addr), .b_din(host_out_din),
    .b_dout(host_out_dout));

  axis_cmd_demux #(.N(MAX_ACCS)) u_to_accs (
    .s_tdest(ci_tdest), .s_tdata(ci_tdata), .s_tlast(ci_tlast),
    .s_tvalid(ci_tvalid), .s_tready(ci_tready),
    .m_tvalid(acc_in_tvalid), .m_tready(acc_in_tready),
    .m_tdata(acc_in_tdata), .m_tlast(acc_in_tlast));

  axis_cmd_mux #(.N(MAX_ACCS)) u_from_accs (
    .clk, .rst(!rstn),
    .s_tvalid(acc_out_tvalid), .s_tready(acc_out_tready), .s_tdata(acc_out_tdata),
    .s_tlast(acc_out_tlast),
    .m_tid(co_tid), .m_tdata(co_tdata), .m_tvalid(co_tvalid), .m_tready(co_tready));
endmodule
