// Cost-gated branch predictor at two cost thresholds, 16 and 32.
//
// Two full-size copies of spec_ctrl_top, with BP_COST_THR = 16 and 32 and
// gating switched off, each run under their own copy of the core model of
// the end-to-end test (closed loop: a copy's own mis-predictions decide its
// flushes, so the two streams differ after the first disagreement). The
// same program of 16 static branches is used in both.
//
// Per copy and cycle the testbench checks the ROB index of a new branch,
// the cost and mis-prediction flag of a resolved branch against the model,
// and that the two predictor-path counters in stats_o add up to the
// branches dispatched, split as disp_br_o.combined says. At the end it
// checks the property the threshold is chosen for: at threshold 32 more
// branches count as low cost, so a larger share of predictions is served by
// gshare alone than at 16. It prints, per threshold, the share of gshare-only
// predictions and the mis-prediction rate.
module tb_bp_cost_sweep;
  import spec_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int CYCLES = 20000;
  int checks = 0, failures = 0;
  int n_br [2], n_gs [2], n_comb [2], n_misp [2];
  bit done [2];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  for (genvar v = 0; v < 2; v++) begin : g_cfg
    logic        ready, gate, disp_br_v, wb_v, wb_t;
    logic [3:0]  disp_cnt, commit_cnt;
    logic [2:0]  slot;
    logic [31:0] br_pc;
    logic [6:0]  wb_idx;
    logic [7:0]  rob_count, rob_free;
    disp_resp_t  dr;
    wb_resp_t    wr;
    stats_t      st;

    spec_ctrl_top #(.BP_COST_THR(v == 0 ? 16 : 32)) u_dut (
      .clk_i(clk), .rst_ni(rst_n), .cfg_gate_mode_i(GATE_OFF), .cfg_dyn_cost_i(1'b0),
      .cfg_dyn_pg_i(1'b0), .cfg_conf_pattern_i(1'b0), .ready_o(ready),
      .disp_cnt_i(disp_cnt), .disp_br_valid_i(disp_br_v), .disp_br_slot_i(slot), .disp_br_pc_i(br_pc),
      .disp_br_o(dr), .rob_count_o(rob_count), .rob_free_o(rob_free),
      .wb_valid_i(wb_v), .wb_rob_idx_i(wb_idx), .wb_taken_i(wb_t), .wb_o(wr),
      .commit_cnt_i(commit_cnt), .fetch_gate_o(gate), .stats_o(st));

    typedef struct {
      int idx; bit is_br; bit resolved; int res_cyc; bit actual; bit pred; int ready_cyc;
    } ent_t;

    initial begin
      ent_t q[$];
      int alt_state [16];
      int next_idx, b;
      n_br[v] = 0; n_gs[v] = 0; n_comb[v] = 0; n_misp[v] = 0; done[v] = 0;
      for (int i = 0; i < 16; i++) alt_state[i] = 0;
      disp_cnt = 0; disp_br_v = 0; slot = 0; br_pc = 0; wb_v = 0; wb_idx = 0; wb_t = 0; commit_cnt = 0;
      @(posedge clk);
      while (!rst_n || !ready) @(posedge clk);
      #1;
      next_idx = 0; b = 0;
      for (int cyc = 0; cyc < CYCLES; cyc++) begin
        int p, c, d, exp_cost;
        bit flush, pred;
        ent_t e;
        p = -1;
        foreach (q[i]) if (q[i].is_br && !q[i].resolved && q[i].ready_cyc <= cyc) begin p = i; break; end
        wb_v = p >= 0;
        wb_idx = (p >= 0) ? 7'(q[p].idx) : 7'd0;
        wb_t = (p >= 0) ? q[p].actual : 1'b0;
        flush = p >= 0 && q[p].actual != q[p].pred;
        c = 0;
        while (c < 8 && c < q.size() && (q[c].is_br ? (q[c].resolved && q[c].res_cyc < cyc) : q[c].ready_cyc <= cyc)) c++;
        if (p >= 0 && c > p) c = p;
        commit_cnt = 4'(c);
        d = (q.size() < 128) ? $urandom_range(1, 8) : 0;
        if (d > 128 - q.size()) d = 128 - q.size();
        disp_br_v = 0;
        if (d > 0 && $urandom_range(0, 9) < 7) begin
          disp_br_v = 1;
          slot = 3'($urandom_range(0, d - 1));
          b = ($urandom_range(0, 4) == 0) ? $urandom_range(0, 15) : (b + 1) % 16;
          br_pc = 32'h0040_0000 + 32'(b) * 32'h44;
        end
        disp_cnt = 4'(d);
        #1;
        check(rob_count == 8'(q.size()), "ROB occupancy");
        if (p >= 0) begin
          exp_cost = q.size() - 1 - p;
          check(int'(wr.cost) == exp_cost, $sformatf("cost %0d expected %0d", wr.cost, exp_cost));
          check(wr.mispredict == flush, "mis-prediction flag");
        end
        pred = dr.taken;
        if (disp_br_v && !flush) begin
          check(dr.rob_idx == 7'((next_idx + int'(slot)) % 128), "branch ROB index");
          n_br[v]++;
          if (dr.combined) n_comb[v]++; else n_gs[v]++;
        end
        @(posedge clk); #1;
        check(int'(st.gshare_only_cnt) == n_gs[v] && int'(st.combined_cnt) == n_comb[v],
              "path counters match the dispatched branches");
        if (p >= 0) begin q[p].resolved = 1; q[p].res_cyc = cyc; end
        if (flush) begin
          n_misp[v]++;
          while (q.size() > p + 1) void'(q.pop_back());
          next_idx = (q[p].idx + 1) % 128;
        end else begin
          for (int k = 0; k < d; k++) begin
            e.idx = next_idx; e.is_br = disp_br_v && k == int'(slot); e.resolved = 0; e.res_cyc = 0;
            e.pred = pred;
            if (e.is_br) begin
              if (b < 6) e.actual = $urandom_range(0, 19) != 0;
              else if (b < 10) begin alt_state[b] ^= 1; e.actual = alt_state[b][0]; end
              else e.actual = 1'($urandom);
            end else e.actual = 1'b0;
            e.ready_cyc = cyc + (e.is_br ? ((b % 3 == 0) ? $urandom_range(25, 50) : $urandom_range(2, 8))
                                         : (($urandom_range(0, 49) == 0) ? 60 : $urandom_range(1, 6)));
            q.push_back(e);
            next_idx = (next_idx + 1) % 128;
          end
        end
        for (int k = 0; k < c; k++) void'(q.pop_front());
        disp_cnt = 0; disp_br_v = 0; wb_v = 0; commit_cnt = 0;
      end
      check(int'(st.mispredicts) == n_misp[v], "mis-predictions counted");
      done[v] = 1;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    wait (done[0] && done[1]);
    for (int v = 0; v < 2; v++) begin
      check(n_gs[v] > 0 && n_comb[v] > 0, "both predictor paths used");
      $display("cost threshold %0d: %0d branches, %0d%% gshare only, %0d mis-predicted",
               v == 0 ? 16 : 32, n_br[v], n_gs[v] * 100 / n_br[v], n_misp[v]);
    end
    check(n_gs[1] * n_br[0] > n_gs[0] * n_br[1], "threshold 32 serves a larger share from gshare alone");
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
