// End-to-end testbench for spec_ctrl_top at its default parameters
// (128-entry ROB, 8-wide, 8k-entry branch tables, 8192-cycle threshold
// window).
//
// The testbench plays an out-of-order core around the unit. A synthetic
// program of 16 static branches (some strongly biased, some alternating,
// some random; some resolving late, so that many instructions pile up behind
// them) is dispatched up to 8 instructions per cycle, with at most one
// branch per group. Instructions complete after a random latency, branches
// resolve oldest-ready-first one per cycle, and up to 8 completed
// instructions retire per cycle. The core stops dispatching while
// fetch_gate_o is high or the ROB is full.
//
// Its own model, an ordered list of in-flight instructions, gives the
// expected values independently of the unit's pointers: the ROB index of a
// new branch, the occupancy, the cost of a resolved branch (instructions
// after it in the list), the mis-prediction flag, the cost class, the gating
// counter (flagged branches in flight) and the gate itself. It runs once in
// every gating mode with the JRS confidence estimator, once with both
// dynamic thresholds, and twice with the outcome-pattern confidence
// estimator, whose answer it checks against the last four resolved
// directions. It counts the mechanisms: gating episodes per mode, flushes of
// high- and low-cost branches, full-ROB stalls, gating-counter decrements by
// retirement, by flush and at write-back, both predictor paths, dynamic
// cost-threshold changes, every dynamic gating threshold, both answers of
// the outcome-pattern estimator, and cost analysis table hits with both
// right and wrong classes (checked exactly against a model of the table at
// cost threshold 64). A mechanism that never happens is a failure.
module tb_spec_ctrl_top;
  import spec_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  gate_mode_e mode;
  logic       dyn_cost, dyn_pg, conf_pat, ready, disp_br_v, wb_v, wb_t, gate;
  logic [3:0] disp_cnt, commit_cnt;
  logic [2:0] slot;
  logic [31:0] br_pc;
  logic [6:0] wb_idx;
  logic [7:0] rob_count, rob_free;
  disp_resp_t dr;
  wb_resp_t   wr;
  stats_t     st;

  spec_ctrl_top dut (
    .clk_i(clk), .rst_ni(rst_n), .cfg_gate_mode_i(mode), .cfg_dyn_cost_i(dyn_cost), .cfg_dyn_pg_i(dyn_pg), .cfg_conf_pattern_i(conf_pat),
    .ready_o(ready), .disp_cnt_i(disp_cnt), .disp_br_valid_i(disp_br_v), .disp_br_slot_i(slot),
    .disp_br_pc_i(br_pc), .disp_br_o(dr), .rob_count_o(rob_count), .rob_free_o(rob_free),
    .wb_valid_i(wb_v), .wb_rob_idx_i(wb_idx), .wb_taken_i(wb_t), .wb_o(wr), .commit_cnt_i(commit_cnt),
    .fetch_gate_o(gate), .stats_o(st));

  typedef struct {
    int idx; bit is_br; bit resolved; int res_cyc; bit actual; bit pred; bit flagged; int ready_cyc;
    bit s_hit; bit s_high; int s_b;  // cost analysis table lookup at dispatch
  } ent_t;
  ent_t q[$];
  int checks = 0, failures = 0;
  int cyc, next_idx, m_cnt;
  int alt_state [16];
  int n_high_flush = 0, n_low_flush = 0, n_full = 0, n_dec_commit = 0, n_dec_flush = 0, n_dec_wb = 0;
  int n_thr_change = 0, n_comb = 0, n_gs = 0, n_lchc = 0, n_misp = 0;
  int gate_ev [8];
  bit pg_seen [4];
  int pc_of [16];
  int m_out;                        // last 4 resolved directions, newest at bit 0
  int n_ptn_high = 0, n_ptn_low = 0;
  // cost analysis table model: one entry per branch (no aliasing at 2k entries)
  bit s_valid [16];
  int s_ctr [16];
  int exp_s_hits, exp_s_correct, tot_s_hits = 0, tot_s_wrong = 0;

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

  task automatic run(input gate_mode_e m, input bit dc, input bit dp, input bit cp, input int cycles);
    int b;
    logic [7:0] last_thr;
    mode = m; dyn_cost = dc; dyn_pg = dp; conf_pat = cp; m_out = 0;
    disp_cnt = 0; disp_br_v = 0; slot = 0; br_pc = 0; wb_v = 0; wb_idx = 0; wb_t = 0; commit_cnt = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    while (!ready) @(posedge clk);
    #1;
    q.delete(); next_idx = 0; m_cnt = 0; b = 0;
    for (int i = 0; i < 16; i++) begin alt_state[i] = 0; s_valid[i] = 0; s_ctr[i] = 0; end
    exp_s_hits = 0; exp_s_correct = 0;
    last_thr = st.cost_thr;
    for (cyc = 0; cyc < cycles; cyc++) begin
      int p, c, d, thr, exp_cost;
      bit flush, ev_gate;
      ent_t e;
      disp_resp_t drs;
      // ---- write-back: oldest ready unresolved branch
      p = -1;
      foreach (q[i]) if (q[i].is_br && !q[i].resolved && q[i].ready_cyc <= cyc) begin p = i; break; end
      wb_v = p >= 0;
      wb_idx = (p >= 0) ? 7'(q[p].idx) : 7'd0;
      wb_t = (p >= 0) ? q[p].actual : 1'b0;
      flush = p >= 0 && q[p].actual != q[p].pred;
      // ---- retirement: completed oldest instructions
      c = 0;
      while (c < 8 && c < q.size() && (q[c].is_br ? (q[c].resolved && q[c].res_cyc < cyc) : q[c].ready_cyc <= cyc)) c++;
      if (p >= 0 && c > p) c = p;
      commit_cnt = 4'(c);
      // ---- dispatch
      d = 0; disp_br_v = 0;
      if (gate) ; // gated: fetch stopped
      else if (128 - q.size() - 0 < 1) n_full++;
      else d = $urandom_range(1, 8);
      if (d > 128 - q.size()) d = 128 - q.size();
      if (d > 0 && $urandom_range(0, 9) < 7) begin
        disp_br_v = 1;
        slot = 3'($urandom_range(0, d - 1));
        b = ($urandom_range(0, 4) == 0) ? $urandom_range(0, 15) : (b + 1) % 16;
        br_pc = 32'(pc_of[b]);
      end
      disp_cnt = 4'(d);
      #1;
      // ---- checks against the model
      check(rob_count == 8'(q.size()) && rob_free == 8'(128 - q.size()), "ROB occupancy");
      check(int'(st.lchc_cnt) == m_cnt, $sformatf("gating counter %0d expected %0d", st.lchc_cnt, m_cnt));
      thr = dp ? ((q.size() < 32) ? 3 : (q.size() < 64) ? 2 : (q.size() < 96) ? 1 : 0)
               : ((m == GATE_ORIG_PG) ? 2 : 1);
      check(int'(st.pg_thr) == thr, "gating threshold");
      check(gate == (m_cnt > thr), "gate = counter > threshold");
      if (dp) pg_seen[thr] = 1;
      if (!dc) check(st.cost_thr == 8'd32, "static cost threshold 32");
      if (st.cost_thr != last_thr) begin n_thr_change++; last_thr = st.cost_thr; end
      if (p >= 0) begin
        exp_cost = q.size() - 1 - p;
        check(int'(wr.cost) == exp_cost, $sformatf("cost %0d expected %0d", wr.cost, exp_cost));
        check(wr.mispredict == flush, "mis-prediction flag");
        check(wr.high_cost == (exp_cost > int'(st.cost_thr)), "cost class");
      end
      if (disp_br_v) begin
        check(dr.rob_idx == 7'((next_idx + int'(slot)) % 128), "branch ROB index");
        case (m)
          GATE_OFF:     check(!dr.lchc, "no flag when gating is off");
          GATE_ORIG_PG: check(dr.lchc == dr.low_conf, "original gating flags low confidence");
          GATE_PATTERN: check(dr.lchc == (dr.low_conf && dr.high_cost), "LCHC = low confidence and high cost");
          default:      check(!dr.lchc || dr.low_conf, "only low-confidence branches flagged");
        endcase
        if (dr.combined) n_comb++; else n_gs++;
        if (cp) begin
          check(dr.low_conf == ($countones(4'(m_out)) < 3), "outcome-pattern confidence (3 of last 4 taken)");
          if (dr.low_conf) n_ptn_low++; else n_ptn_high++;
        end
      end
      ev_gate = gate;
      drs = dr;
      @(posedge clk); #1;
      // ---- model update
      if (p >= 0) begin
        q[p].resolved = 1; q[p].res_cyc = cyc;
        m_out = ((m_out << 1) | int'(q[p].actual)) & 15;
        if (m == GATE_ORIG_PG && q[p].flagged) begin m_cnt--; q[p].flagged = 0; n_dec_wb++; end
      end
      if (flush) begin
        n_misp++;
        if (exp_cost > int'(last_thr)) n_high_flush++; else n_low_flush++;
        if (q[p].s_hit) begin
          exp_s_hits++;
          if (q[p].s_high == (exp_cost > 64)) exp_s_correct++;
        end
        begin
          int sb;
          sb = q[p].s_b;
          if (!s_valid[sb]) begin s_valid[sb] = 1; s_ctr[sb] = 0; end
          if (exp_cost > 64) s_ctr[sb] = (s_ctr[sb] == 3) ? 3 : s_ctr[sb] + 1;
          else               s_ctr[sb] = (s_ctr[sb] == 0) ? 0 : s_ctr[sb] - 1;
        end
        while (q.size() > p + 1) begin
          e = q.pop_back();
          if (e.flagged) begin m_cnt--; n_dec_flush++; end
        end
        next_idx = (q[p].idx + 1) % 128;
      end else begin
        for (int k = 0; k < d; k++) begin
          e.idx = next_idx; e.is_br = disp_br_v && k == int'(slot); e.resolved = 0; e.res_cyc = 0;
          e.flagged = e.is_br && drs.lchc; e.pred = drs.taken;
          e.s_b = b; e.s_hit = e.is_br && s_valid[b]; e.s_high = s_ctr[b] >= 2;
          e.actual = e.is_br ? outcome(b) : 1'b0;
          e.ready_cyc = cyc + (e.is_br ? br_latency(b) : (($urandom_range(0, 49) == 0) ? 60 : $urandom_range(1, 6)));
          if (e.flagged) begin m_cnt++; n_lchc++; end
          q.push_back(e);
          next_idx = (next_idx + 1) % 128;
        end
      end
      for (int k = 0; k < c; k++) begin
        e = q.pop_front();
        if (e.flagged) begin m_cnt--; n_dec_commit++; end
      end
      disp_cnt = 0; disp_br_v = 0; wb_v = 0; commit_cnt = 0;
    end
    gate_ev[int'(m)] += int'(st.gate_events);
    check(st.mispredicts > 0, "mis-predictions counted");
    check(int'(st.study_hits) == exp_s_hits && int'(st.study_correct) == exp_s_correct,
          $sformatf("cost analysis table: hits %0d/%0d correct %0d/%0d", st.study_hits, exp_s_hits, st.study_correct, exp_s_correct));
    tot_s_hits += exp_s_hits; tot_s_wrong += exp_s_hits - exp_s_correct;
    $display("mode %0d: gating episodes %0d, gated cycles %0d, mispredicts %0d, high-cost flushes %0d, gshare-only %0d, combined %0d",
             m, st.gate_events, st.gated_cycles, st.mispredicts, st.high_cost_flushes, st.gshare_only_cnt, st.combined_cnt);
  endtask

  initial begin
    for (int i = 0; i < 16; i++) pc_of[i] = 32'h0040_0000 + i * 32'h44;
    for (int i = 0; i < 8; i++) gate_ev[i] = 0;
    run(GATE_OFF, 0, 0, 0, 2000);
    run(GATE_ORIG_PG, 0, 0, 0, 3000);
    run(GATE_PC_COST, 0, 0, 0, 3000);
    run(GATE_PATTERN, 0, 0, 0, 3000);
    run(GATE_LOCAL, 0, 0, 0, 3000);
    run(GATE_HCLC, 0, 0, 0, 3000);
    run(GATE_COMBINED, 0, 0, 0, 3000);
    run(GATE_PATTERN, 1, 1, 0, 20000);
    run(GATE_ORIG_PG, 0, 0, 1, 3000);
    run(GATE_PATTERN, 0, 0, 1, 3000);
    // mechanisms
    check(gate_ev[int'(GATE_OFF)] == 0, "no gating when off");
    for (int m = 1; m <= 6; m++) check(gate_ev[m] > 0, $sformatf("gating happened in mode %0d", m));
    check(n_high_flush > 0, "high-cost flush");
    check(n_low_flush > 0, "low-cost flush");
    check(n_full > 0, "ROB full stall");
    check(n_dec_commit > 0, "gating counter decremented at retirement");
    check(n_dec_flush > 0, "gating counter decremented by flush");
    check(n_dec_wb > 0, "gating counter decremented at write-back (original gating)");
    check(n_comb > 0 && n_gs > 0, "both predictor paths used");
    check(n_thr_change > 0, "dynamic cost threshold changed");
    check(pg_seen[0] && pg_seen[1] && pg_seen[2] && pg_seen[3], "every dynamic gating threshold used");
    check(n_ptn_high > 0 && n_ptn_low > 0, "outcome-pattern estimator gave both confidences");
    check(tot_s_hits > 0, "cost analysis table predicted a mis-predicted branch");
    check(tot_s_wrong > 0 && tot_s_wrong < tot_s_hits, "cost analysis table right and wrong at least once");
    $display("outcome-pattern confidence: %0d high, %0d low", n_ptn_high, n_ptn_low);
    $display("cost analysis table: %0d predicted mis-predictions, %0d wrong", tot_s_hits, tot_s_wrong);
    $display("mechanisms: high-cost flushes %0d, low-cost flushes %0d, full stalls %0d, dec commit/flush/wb %0d/%0d/%0d, paths comb/gshare %0d/%0d, cost-thr changes %0d",
             n_high_flush, n_low_flush, n_full, n_dec_commit, n_dec_flush, n_dec_wb, n_comb, n_gs, n_thr_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
