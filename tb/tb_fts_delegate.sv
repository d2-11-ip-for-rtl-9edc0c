// tb_fts_delegate: issues every custom instruction to one FTS Delegate
// with a scripted FTS Manager side, and checks the packet each one offers
// to the manager, the success/failure reply, the ready-queue behaviour of
// Fetch SW ID (peek) and Fetch Picos ID (pop), that xd = 0 gives no reply,
// and the one-cycle reply latency.
module tb_fts_delegate;
  import fts_pkg::*;
  logic clk = 0, rst = 1;
  logic cmd_valid, cmd_ready, cmd_xd, resp_valid, resp_ready, busy;
  logic [6:0] cmd_funct7;
  logic [4:0] cmd_rd, resp_rd;
  word_t cmd_rs1, cmd_rs2, resp_data;
  logic init_valid, init_ready, info_valid, info_ready, dep_valid, dep_ready;
  logic wf_valid, wf_ready, ret_valid, ret_ready, rdy_valid, rdy_ready;
  init_t init_data;
  word_t info_data;
  dep_t dep_data;
  picos_id_t ret_id;
  ready_t rdy_data;
  int checks = 0, failures = 0;

  fts_delegate dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // snapshot of what the delegate offered in the accept cycle
  logic s_init, s_info, s_dep, s_wf, s_ret;
  init_t s_init_d; word_t s_info_d; dep_t s_dep_d; picos_id_t s_ret_id;

  task automatic issue(funct7_e fn, word_t rs1, word_t rs2, output word_t res, input bit xd = 1);
    int lat;
    cmd_valid = 1; cmd_funct7 = fn; cmd_rs1 = rs1; cmd_rs2 = rs2; cmd_xd = xd; cmd_rd = 5'(fn + 3);
    #1;
    while (!cmd_ready) begin @(posedge clk); #1; end
    s_init = init_valid; s_info = info_valid; s_dep = dep_valid; s_wf = wf_valid; s_ret = ret_valid;
    s_init_d = init_data; s_info_d = info_data; s_dep_d = dep_data; s_ret_id = ret_id;
    @(posedge clk); #1;
    cmd_valid = 0;
    res = '0;
    if (xd) begin
      chk(resp_valid && resp_rd == 5'(fn + 3), "reply one cycle after accept");
      chk(!cmd_ready && busy, "no new command while reply pending");
      res = resp_data;
      @(posedge clk); #1;
      chk(!resp_valid, "reply consumed");
    end else begin
      chk(!resp_valid, "no reply for xd=0");
    end
  endtask

  initial begin
    word_t r;
    cmd_valid = 0; cmd_funct7 = 0; cmd_rs1 = 0; cmd_rs2 = 0; cmd_xd = 0; cmd_rd = 0;
    resp_ready = 1; init_ready = 1; info_ready = 1; dep_ready = 1; wf_ready = 1; ret_ready = 1;
    rdy_valid = 0; rdy_data = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;

    issue(FN_INIT_TASK, 64'hDEAD_BEEF_0000_0001, 64'd3, r);
    chk(s_init && s_init_d.sw_id == 64'hDEAD_BEEF_0000_0001 && s_init_d.num_deps == 3 && !s_info && !s_dep, "init packet");
    chk(r == 1, "init success");
    init_ready = 0;
    issue(FN_INIT_TASK, 64'h5, 64'd0, r);
    chk(r == 0, "init failure when queue full");
    issue(FN_ADD_INFO, 64'h1234, 0, r);
    chk(s_info && s_info_d == 64'h1234 && r == 1, "add info");
    issue(FN_IN_DEPS, 64'hA0, 64'hB0, r);
    chk(s_dep && s_dep_d.dir == DEP_IN && s_dep_d.two && s_dep_d.addr0 == 64'hA0 && s_dep_d.addr1 == 64'hB0 && r == 1, "in deps");
    issue(FN_OUT_DEP, 64'hC0, 64'hFF, r);
    chk(s_dep && s_dep_d.dir == DEP_OUT && !s_dep_d.two && s_dep_d.addr0 == 64'hC0, "out dep");
    issue(FN_IN_DEP, 64'hD0, 0, r);
    chk(s_dep && s_dep_d.dir == DEP_IN && !s_dep_d.two, "in dep");
    dep_ready = 0;
    issue(FN_OUT_DEPS, 64'hE0, 64'hE8, r);
    chk(s_dep && s_dep_d.dir == DEP_OUT && s_dep_d.two && r == 0, "out deps refused");

    issue(FN_FETCH_SWID, 0, 0, r);
    chk(r == 0, "fetch sw id on empty queue");
    issue(FN_FETCH_PICOS, 0, 0, r);
    chk(r == 0, "fetch picos id on empty queue");
    // two ready tasks arrive
    rdy_valid = 1; rdy_data = '{picos_id: 32'd77, sw_id: 64'h4444};
    @(posedge clk); #1 chk(rdy_ready, "ready queue has room");
    rdy_data = '{picos_id: 32'd78, sw_id: 64'h5555};
    @(posedge clk); #1;
    rdy_data = '{picos_id: 32'd79, sw_id: 64'h6666};
    #1 chk(!rdy_ready, "ready queue full at READY_DEPTH");
    rdy_valid = 0;
    issue(FN_FETCH_SWID, 0, 0, r);
    chk(r == 64'h4444, "fetch sw id");
    issue(FN_FETCH_SWID, 0, 0, r);
    chk(r == 64'h4444, "fetch sw id does not pop");
    issue(FN_FETCH_PICOS, 0, 0, r);
    chk(r == {31'd0, 1'b1, 32'd77}, "fetch picos id");
    issue(FN_FETCH_SWID, 0, 0, r);
    chk(r == 64'h5555, "next task after pop");

    ret_ready = 0;
    issue(FN_RETIRE, 64'd77, 0, r);
    chk(s_ret && s_ret_id == 77 && r == 0, "retire refused -> retry");
    ret_ready = 1;
    issue(FN_RETIRE, 64'd77, 0, r);
    chk(s_ret && r == 1, "retire accepted");
    issue(FN_READY_REQ, 0, 0, r);
    chk(s_wf && r == 1, "ready task request");
    wf_ready = 0;
    issue(FN_READY_REQ, 0, 0, r);
    chk(r == 0, "ready task request refused");
    issue(FN_ADD_INFO, 64'h99, 0, r, 0);
    chk(s_info, "xd=0 still performs the action");
    issue(funct7_e'(7'd100), 0, 0, r);
    chk(r == 0 && !s_init && !s_info && !s_dep && !s_wf && !s_ret, "unknown funct7 does nothing");
    // response back-pressure
    resp_ready = 0;
    cmd_valid = 1; cmd_funct7 = FN_FETCH_SWID; cmd_xd = 1;
    @(posedge clk); #1 cmd_valid = 0;
    repeat (3) begin chk(resp_valid && !cmd_ready, "reply held"); @(posedge clk); #1; end
    resp_ready = 1;
    @(posedge clk); #1 chk(!resp_valid, "reply released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
