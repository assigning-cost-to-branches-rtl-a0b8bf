// Threshold-sweep testbench for spec_ctrl_top: the gating-threshold and
// cost-threshold settings that the design is meant to be tuned over, run
// side by side on one instruction stream.
//
// Eight copies of the unit at full size see exactly the same core traffic:
//  * g_pg[k]   : original pipeline gating (low-confidence branches only)
//                with gating threshold k = 0, 1, 2, 3;
//  * g_cost[j] : gating on low confidence and the cost pattern predictor,
//                with cost threshold 16, 32, 64, 96.
// The core model is the one of the end-to-end test but open loop: it ignores
// fetch_gate_o, so that the stream, and with it every prediction, ROB index
// and cost, is the same in all copies. Gating is then observed rather than
// obeyed; the copies' gate outputs and counters are compared instead.
//
// Checks, every cycle: all copies agree on direction, confidence, ROB index,
// mis-prediction and cost; the cost matches the model; each g_pg copy's
// counter equals the model's count of flagged low-confidence branches in
// flight and its gate equals count > k, so a lower threshold gates whenever
// a higher one does; each g_cost copy classifies the cost against its own
// threshold. At the end: gated cycles fall as the gating threshold rises,
// every gating threshold gated at least once, high-cost flush counts match
// the model and fall as the cost threshold rises, and each cost threshold saw
// at least one high-cost flush. Per-setting gating counts are printed.
module tb_threshold_sweep;
  import spec_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  function automatic int cost_thr_of(int j);
    return (j == 0) ? 16 : (j == 1) ? 32 : (j == 2) ? 64 : 96;
  endfunction

  logic        disp_br_v, wb_v, wb_t;
  logic [3:0]  disp_cnt, commit_cnt;
  logic [2:0]  slot;
  logic [31:0] br_pc;
  logic [6:0]  wb_idx;

  logic       ready_pg [4], gate_pg [4], ready_ct [4], gate_ct [4];
  logic [7:0] cnt_pg [4], free_pg [4], cnt_ct [4], free_ct [4];
  disp_resp_t dr_pg [4], dr_ct [4];
  wb_resp_t   wr_pg [4], wr_ct [4];
  stats_t     st_pg [4], st_ct [4];

  for (genvar k = 0; k < 4; k++) begin : g_pg
    spec_ctrl_top #(.THR_PG_ORIG(k)) u_dut (
      .clk_i(clk), .rst_ni(rst_n), .cfg_gate_mode_i(GATE_ORIG_PG), .cfg_dyn_cost_i(1'b0),
      .cfg_dyn_pg_i(1'b0), .cfg_conf_pattern_i(1'b0), .ready_o(ready_pg[k]),
      .disp_cnt_i(disp_cnt), .disp_br_valid_i(disp_br_v), .disp_br_slot_i(slot), .disp_br_pc_i(br_pc),
      .disp_br_o(dr_pg[k]), .rob_count_o(cnt_pg[k]), .rob_free_o(free_pg[k]),
      .wb_valid_i(wb_v), .wb_rob_idx_i(wb_idx), .wb_taken_i(wb_t), .wb_o(wr_pg[k]),
      .commit_cnt_i(commit_cnt), .fetch_gate_o(gate_pg[k]), .stats_o(st_pg[k]));
  end

  for (genvar j = 0; j < 4; j++) begin : g_cost
    spec_ctrl_top #(.COST_THR(cost_thr_of(j))) u_dut (
      .clk_i(clk), .rst_ni(rst_n), .cfg_gate_mode_i(GATE_PATTERN), .cfg_dyn_cost_i(1'b0),
      .cfg_dyn_pg_i(1'b0), .cfg_conf_pattern_i(1'b0), .ready_o(ready_ct[j]),
      .disp_cnt_i(disp_cnt), .disp_br_valid_i(disp_br_v), .disp_br_slot_i(slot), .disp_br_pc_i(br_pc),
      .disp_br_o(dr_ct[j]), .rob_count_o(cnt_ct[j]), .rob_free_o(free_ct[j]),
      .wb_valid_i(wb_v), .wb_rob_idx_i(wb_idx), .wb_taken_i(wb_t), .wb_o(wr_ct[j]),
      .commit_cnt_i(commit_cnt), .fetch_gate_o(gate_ct[j]), .stats_o(st_ct[j]));
  end

  typedef struct {
    int idx; bit is_br; bit resolved; int res_cyc; bit actual; bit pred; bit flagged; int ready_cyc;
  } ent_t;
  ent_t q[$];
  int checks = 0, failures = 0;
  int cyc, next_idx, m_cnt;
  int alt_state [16];
  int pc_of [16];
  int gated_pg [4], hi_ct [4];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, what); end
  endtask

  function automatic bit outcome(int b);
    if (b < 6) return $urandom_range(0, 19) != 0;
    if (b < 10) begin alt_state[b] ^= 1; return alt_state[b][0]; end
    return 1'($urandom);
  endfunction

  function automatic int br_latency(int b);
    return (b % 3 == 0) ? $urandom_range(25, 50) : $urandom_range(2, 8);
  endfunction

  function automatic bit all_ready();
    for (int i = 0; i < 4; i++) if (!ready_pg[i] || !ready_ct[i]) return 0;
    return 1;
  endfunction

  initial begin
    int b;
    for (int i = 0; i < 16; i++) begin pc_of[i] = 32'h0040_0000 + i * 32'h44; alt_state[i] = 0; end
    for (int i = 0; i < 4; i++) begin gated_pg[i] = 0; hi_ct[i] = 0; end
    disp_cnt = 0; disp_br_v = 0; slot = 0; br_pc = 0; wb_v = 0; wb_idx = 0; wb_t = 0; commit_cnt = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    while (!all_ready()) @(posedge clk);
    #1;
    next_idx = 0; m_cnt = 0; b = 0;
    for (cyc = 0; cyc < 20000; cyc++) begin
      int p, c, d, exp_cost;
      bit flush;
      ent_t e;
      disp_resp_t drs;
      // write-back: oldest ready unresolved branch
      p = -1;
      foreach (q[i]) if (q[i].is_br && !q[i].resolved && q[i].ready_cyc <= cyc) begin p = i; break; end
      wb_v = p >= 0;
      wb_idx = (p >= 0) ? 7'(q[p].idx) : 7'd0;
      wb_t = (p >= 0) ? q[p].actual : 1'b0;
      flush = p >= 0 && q[p].actual != q[p].pred;
      // retirement
      c = 0;
      while (c < 8 && c < q.size() && (q[c].is_br ? (q[c].resolved && q[c].res_cyc < cyc) : q[c].ready_cyc <= cyc)) c++;
      if (p >= 0 && c > p) c = p;
      commit_cnt = 4'(c);
      // dispatch, open loop: only a full ROB stops it
      d = (q.size() < 128) ? $urandom_range(1, 8) : 0;
      if (d > 128 - q.size()) d = 128 - q.size();
      disp_br_v = 0;
      if (d > 0 && $urandom_range(0, 9) < 7) begin
        disp_br_v = 1;
        slot = 3'($urandom_range(0, d - 1));
        b = ($urandom_range(0, 4) == 0) ? $urandom_range(0, 15) : (b + 1) % 16;
        br_pc = 32'(pc_of[b]);
      end
      disp_cnt = 4'(d);
      #1;
      exp_cost = (p >= 0) ? q.size() - 1 - p : 0;
      for (int i = 0; i < 4; i++) begin
        check(cnt_pg[i] == 8'(q.size()) && cnt_ct[i] == 8'(q.size()), "ROB occupancy");
        if (disp_br_v) begin
          check(dr_pg[i].taken == dr_pg[0].taken && dr_ct[i].taken == dr_pg[0].taken, "copies agree on direction");
          check(dr_pg[i].low_conf == dr_pg[0].low_conf && dr_ct[i].low_conf == dr_pg[0].low_conf, "copies agree on confidence");
          check(dr_pg[i].rob_idx == 7'((next_idx + int'(slot)) % 128) && dr_ct[i].rob_idx == dr_pg[i].rob_idx, "ROB index");
          check(dr_pg[i].lchc == dr_pg[i].low_conf, "original gating flags low confidence");
          check(dr_ct[i].lchc == (dr_ct[i].low_conf && dr_ct[i].high_cost), "LCHC = low confidence and high cost");
        end
        if (p >= 0) begin
          check(int'(wr_pg[i].cost) == exp_cost && int'(wr_ct[i].cost) == exp_cost,
                $sformatf("cost %0d expected %0d", wr_ct[i].cost, exp_cost));
          check(wr_pg[i].mispredict == flush && wr_ct[i].mispredict == flush, "mis-prediction flag");
          check(wr_ct[i].high_cost == (exp_cost > cost_thr_of(i)), $sformatf("class at cost threshold %0d", cost_thr_of(i)));
        end
        check(int'(st_pg[i].lchc_cnt) == m_cnt, $sformatf("threshold %0d copy: counter %0d expected %0d", i, st_pg[i].lchc_cnt, m_cnt));
        check(gate_pg[i] == (m_cnt > i), $sformatf("threshold %0d copy: gate", i));
        if (gate_pg[i]) gated_pg[i]++;
        if (flush && exp_cost > cost_thr_of(i)) hi_ct[i]++;
      end
      drs = dr_pg[0];
      @(posedge clk); #1;
      // model update (original gating: the count drops at write-back)
      if (p >= 0) begin
        q[p].resolved = 1; q[p].res_cyc = cyc;
        if (q[p].flagged) begin m_cnt--; q[p].flagged = 0; end
      end
      if (flush) begin
        while (q.size() > p + 1) begin
          e = q.pop_back();
          if (e.flagged) m_cnt--;
        end
        next_idx = (q[p].idx + 1) % 128;
      end else begin
        for (int k = 0; k < d; k++) begin
          e.idx = next_idx; e.is_br = disp_br_v && k == int'(slot); e.resolved = 0; e.res_cyc = 0;
          e.flagged = e.is_br && drs.lchc; e.pred = drs.taken;
          e.actual = e.is_br ? outcome(b) : 1'b0;
          e.ready_cyc = cyc + (e.is_br ? br_latency(b) : (($urandom_range(0, 49) == 0) ? 60 : $urandom_range(1, 6)));
          if (e.flagged) m_cnt++;
          q.push_back(e);
          next_idx = (next_idx + 1) % 128;
        end
      end
      for (int k = 0; k < c; k++) begin
        e = q.pop_front();
        if (e.flagged) m_cnt--;
      end
      disp_cnt = 0; disp_br_v = 0; wb_v = 0; commit_cnt = 0;
    end
    // results
    for (int i = 0; i < 4; i++) begin
      check(int'(st_pg[i].gated_cycles) == gated_pg[i], "gated cycles counted");
      check(st_pg[i].gate_events > 0, $sformatf("gating threshold %0d gated", i));
      if (i > 0) check(gated_pg[i] <= gated_pg[i-1], "fewer gated cycles at a higher gating threshold");
      check(int'(st_ct[i].high_cost_flushes) == hi_ct[i], "high-cost flushes counted");
      check(hi_ct[i] > 0, $sformatf("high-cost flush at cost threshold %0d", cost_thr_of(i)));
      if (i > 0) check(hi_ct[i] <= hi_ct[i-1], "fewer high-cost flushes at a higher cost threshold");
      $display("gating threshold %0d: %0d gating events, %0d gated cycles", i, st_pg[i].gate_events, st_pg[i].gated_cycles);
    end
    for (int i = 0; i < 4; i++)
      $display("cost threshold %0d: %0d high-cost flushes of %0d, %0d gating events, %0d gated cycles",
               cost_thr_of(i), hi_ct[i], st_ct[i].mispredicts, st_ct[i].gate_events, st_ct[i].gated_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
