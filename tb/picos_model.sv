// picos_model: behavioural stand-in for the Picos dependence manager.
//
// Accepts submission sequences beat by beat, then answers with one-cycle
// resp_valid: a negative acknowledgement when CAPACITY tasks are already in
// flight or, to exercise replay, every NACK_EVERY-th submission attempt
// (0 = never); otherwise an acknowledgement. Accepted tasks are treated as
// dependence-free: each becomes ready at once with the next Picos ID
// (starting at 1) and its SW ID. With TRACK_DEPS = 1 it instead records
// each task's dependence pointers and releases a task only when no older,
// not yet retired task shares a pointer with it where either side writes
// (OUT), in creation order; this is enough to serialise a chain of tasks.
// A retirement is three beats; the first holds the Picos ID. Not
// synthesizable as written and only for tests.
module picos_model
  import fts_pkg::*;
#(
  parameter int CAPACITY   = 64,
  parameter int NACK_EVERY = 0,
  parameter bit TRACK_DEPS = 0
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      sub_valid,
  output logic      sub_ready,
  input  sub_beat_t sub_beat,
  input  logic      sub_last,
  output logic      resp_valid,
  output logic      resp_nack,
  output logic      rdy_valid,
  input  logic      rdy_ready,
  output ready_t    rdy_data,
  input  logic      ret_valid,
  output logic      ret_ready,
  input  word_t     ret_data,
  input  logic      ret_last,
  output int        n_accepted,
  output int        n_nacked,
  output int        n_retired,
  output int        n_bad_ret
);
  ready_t    rq[$];
  word_t     cur_swid;
  int        attempts, in_flight, next_id, ret_beat;
  logic      pend;
  bit        live[int];
  localparam int MAXT = 512;
  word_t     cur_addr [MAX_DEPS];
  bit        cur_out  [MAX_DEPS];
  int        cur_n;
  word_t     t_addr [MAXT][MAX_DEPS];
  bit        t_out  [MAXT][MAX_DEPS];
  int        t_n    [MAXT];
  word_t     t_sw   [MAXT];
  bit        t_live [MAXT], t_sent [MAXT];
  bit        rescan;

  function automatic bit conflicts(int a, int b);
    for (int i = 0; i < t_n[a]; i++)
      for (int j = 0; j < t_n[b]; j++)
        if (t_addr[a][i] == t_addr[b][j] && (t_out[a][i] || t_out[b][j])) return 1'b1;
    return 1'b0;
  endfunction

  assign sub_ready = !pend;
  assign ret_ready = 1'b1;
  assign rdy_valid = (rq.size() != 0);
  assign rdy_data  = (rq.size() != 0) ? rq[0] : '0;

  always @(posedge clk) begin
    resp_valid <= 1'b0;
    resp_nack  <= 1'b0;
    if (rst) begin
      rq.delete();
      rescan = 1'b0; cur_n = 0;
      for (int t = 0; t < MAXT; t++) begin t_live[t] = 1'b0; t_sent[t] = 1'b0; t_n[t] = 0; end
      pend <= 1'b0; attempts = 0; in_flight = 0; next_id = 1; ret_beat = 0;
      n_accepted <= 0; n_nacked <= 0; n_retired <= 0; n_bad_ret <= 0;
    end else begin
      if (rdy_valid && rdy_ready) void'(rq.pop_front());
      if (sub_valid && sub_ready) begin
        if (sub_beat.kind == BEAT_HDR) cur_n = 0;
        if (sub_beat.kind == BEAT_SWID) cur_swid = sub_beat.data;
        if ((sub_beat.kind == BEAT_DEP_IN || sub_beat.kind == BEAT_DEP_OUT) && cur_n < MAX_DEPS) begin
          cur_addr[cur_n] = sub_beat.data;
          cur_out[cur_n]  = (sub_beat.kind == BEAT_DEP_OUT);
          cur_n++;
        end
        if (sub_last) pend <= 1'b1;
      end
      if (pend) begin
        pend <= 1'b0;
        attempts++;
        resp_valid <= 1'b1;
        if (in_flight >= CAPACITY || (NACK_EVERY != 0 && attempts % NACK_EVERY == 0)) begin
          resp_nack <= 1'b1;
          n_nacked  <= n_nacked + 1;
        end else begin
          if (!TRACK_DEPS) rq.push_back('{picos_id: picos_id_t'(next_id), sw_id: cur_swid});
          else if (next_id < MAXT) begin
            for (int i = 0; i < cur_n; i++) begin t_addr[next_id][i] = cur_addr[i]; t_out[next_id][i] = cur_out[i]; end
            t_n[next_id] = cur_n; t_sw[next_id] = cur_swid; t_live[next_id] = 1'b1; t_sent[next_id] = 1'b0;
            rescan = 1'b1;
          end
          live[next_id] = 1'b1;
          next_id++;
          in_flight++;
          n_accepted <= n_accepted + 1;
        end
      end
      if (ret_valid) begin
        if (ret_beat == 0) begin
          if (live.exists(int'(ret_data))) begin
            live.delete(int'(ret_data));
            if (TRACK_DEPS && int'(ret_data) < MAXT) begin t_live[int'(ret_data)] = 1'b0; rescan = 1'b1; end
            in_flight--;
            n_retired <= n_retired + 1;
          end else n_bad_ret <= n_bad_ret + 1;
        end
        ret_beat = ret_last ? 0 : ret_beat + 1;
        if (ret_last && ret_beat != 0) n_bad_ret <= n_bad_ret + 1;
      end
      if (TRACK_DEPS && rescan) begin
        rescan = 1'b0;
        for (int t = 1; t < next_id && t < MAXT; t++)
          if (t_live[t] && !t_sent[t]) begin
            bit blocked;
            blocked = 1'b0;
            for (int o = 1; o < t && !blocked; o++)
              if (t_live[o] && conflicts(o, t)) blocked = 1'b1;
            if (!blocked) begin
              rq.push_back('{picos_id: picos_id_t'(t), sw_id: t_sw[t]});
              t_sent[t] = 1'b1;
            end
          end
      end
    end
  end
endmodule
