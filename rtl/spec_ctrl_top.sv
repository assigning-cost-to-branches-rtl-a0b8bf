// spec_ctrl_top: cost-aware speculation-control unit for an 8-wide
// out-of-order core.
//
// The unit sits beside the fetch/dispatch and write-back stages of a core
// with a 128-entry re-order buffer (ROB). For every conditional branch it
// gives, at dispatch, three one-bit answers: the direction (cost-gated
// combined predictor), the confidence (JRS estimator, or with
// cfg_conf_pattern_i the outcome-pattern estimator) and the cost class
// (global cost pattern predictor). It counts the branches that are both
// low-confidence and predicted high-cost (LCHC) and, while more than THR_PG
// of them are in flight, raises fetch_gate_o so that fetch stops. At
// write-back it measures the real cost of the branch, the number of ROB
// entries younger than it (those a mis-prediction flushes), classifies it
// against the cost threshold, trains every table, and on a mis-prediction
// flushes the younger entries.
//
// cfg_gate_mode_i selects which branches the gating counter counts (see
// spec_pkg::gate_mode_e): none, low-confidence only (original pipeline
// gating with threshold THR_PG_ORIG, decremented at write-back), or
// low-confidence branches filtered by the PC-indexed, global-pattern or
// local-history cost predictor, by the HCLC estimator, or by HCLC and the
// pattern predictor together (threshold THR_PG, decremented when the branch
// retires or is flushed). cfg_dyn_cost_i replaces the fixed cost threshold
// COST_THR by the one chosen every DYN_INTERVAL cycles from the recent
// flush costs; cfg_dyn_pg_i replaces the gating threshold by one chosen from
// ROB occupancy. The configuration is meant to be fixed while branches are
// in flight.
//
// A second global cost pattern predictor, trained with the cost threshold
// BP_COST_THR and counting low-cost branches, decides for each branch whether
// the full combined predictor (bimodal + gshare + chooser) is used or only
// gshare, which saves the predictor's power on low-cost branches.
//
// A PC-tagged cost analysis table (2k entries) runs alongside as a
// measurement aid: it is looked up at dispatch, trained by every
// mis-predicted branch with its class at STUDY_COST_THR (64, half the ROB),
// and stats_o.study_hits / study_correct report how often it had predicted
// a mis-predicted branch and how often its class was right. It does not
// influence gating or prediction.
//
// Interface and timing:
//  * After reset the tables clear themselves; wait for ready_o.
//  * Dispatch: disp_cnt_i instructions enter the ROB; at most one of them is
//    a branch (disp_br_valid_i, at position disp_br_slot_i, PC disp_br_pc_i).
//    disp_br_o answers combinationally in the same cycle, including the
//    branch's ROB index. disp_cnt_i must not exceed rob_free_o.
//  * Write-back: wb_valid_i with the branch's ROB index and real direction;
//    wb_o answers combinationally (mis-prediction, cost, class). A
//    mis-prediction flushes the younger entries at the clock edge, and a
//    dispatch in that same cycle is dropped as wrong-path.
//  * Retire: commit_cnt_i oldest entries leave; a branch retires no earlier
//    than the cycle after its write-back.
// Default sizes are those of the evaluated processor; dispatch and decode in
// one cycle, one branch per dispatch group, history updated at write-back
// and the JRS estimator as the default confidence source are this design's
// choices. The evaluated core used a pattern-history estimator whose exact
// rule is not given; cfg_conf_pattern_i selects the outcome-pattern
// estimator (3 of the last 4 branches taken) as the nearest described one.
module spec_ctrl_top #(
  parameter int unsigned ROB_DEPTH    = 128,
  parameter int unsigned DISP_W       = 8,
  parameter int unsigned BP_ENTRIES   = 8192,
  parameter int unsigned JRS_ENTRIES  = 1024,
  parameter int unsigned COST_THR     = 32,
  parameter int unsigned BP_COST_THR  = 16,
  parameter int unsigned THR_PG       = 1,
  parameter int unsigned THR_PG_ORIG  = 2,
  parameter int unsigned GCHR_W       = 4,
  parameter int unsigned DYN_INTERVAL = 8192,
  parameter int unsigned STUDY_ENTRIES  = 2048,
  parameter int unsigned STUDY_COST_THR = 64
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  spec_pkg::gate_mode_e cfg_gate_mode_i,
  input  logic                 cfg_dyn_cost_i,
  input  logic                 cfg_dyn_pg_i,
  input  logic                 cfg_conf_pattern_i,
  output logic                 ready_o,
  // dispatch
  input  logic [3:0]           disp_cnt_i,
  input  logic                 disp_br_valid_i,
  input  logic [2:0]           disp_br_slot_i,
  input  logic [31:0]          disp_br_pc_i,
  output spec_pkg::disp_resp_t disp_br_o,
  output logic [7:0]           rob_count_o,
  output logic [7:0]           rob_free_o,
  // write-back
  input  logic                 wb_valid_i,
  input  logic [6:0]           wb_rob_idx_i,
  input  logic                 wb_taken_i,
  output spec_pkg::wb_resp_t   wb_o,
  // retire
  input  logic [3:0]           commit_cnt_i,
  // fetch control and statistics
  output logic                 fetch_gate_o,
  output spec_pkg::stats_t     stats_o
);
  import spec_pkg::*;

  localparam int unsigned PTR_W  = $clog2(ROB_DEPTH);
  localparam int unsigned CNT_W  = $clog2(ROB_DEPTH + 1);
  localparam int unsigned BPI_W  = $clog2(BP_ENTRIES);

  // ---------------------------------------------------------------- state
  br_meta_t meta_q [ROB_DEPTH];

  // ---------------------------------------------------------------- wires
  logic             busy_pat, busy_bpc, busy_pc, busy_loc, busy_hclc, busy_jrs, busy_bp, busy_cat;
  logic             cat_hit, cat_high, study_high;
  logic             pat_high, pc_high, loc_high, bpc_high, hclc_lchc, high_conf, low_conf;
  logic             jrs_high_conf, ptn_high_conf;
  logic [3:0]       pat_p, bpc_p, loc_p;
  logic [9:0]       jrs_idx;
  logic [BPI_W-1:0] ghr;
  bp_pred_t         bp;
  logic             flagged;
  logic             flush, br_ok;
  logic [PTR_W-1:0] alloc_idx;
  logic [CNT_W-1:0] rob_count, rob_free, wb_cost, flush_flags, cost_thr_dyn, cost_thr;
  logic [3:0]       commit_flags;
  logic             wb_high;
  br_meta_t         wm;
  logic             mispredict, clr;
  logic [7:0]       dyn_thr;
  logic [2:0]       pg_thr;
  logic [7:0]       lchc_cnt;

  assign ready_o = !(busy_pat || busy_bpc || busy_pc || busy_loc || busy_hclc || busy_jrs || busy_bp || busy_cat);

  // ------------------------------------------------------ write-back side
  assign wm         = meta_q[wb_rob_idx_i];
  assign mispredict = wm.bp.taken != wb_taken_i;
  assign flush      = wb_valid_i && mispredict;
  assign clr        = wb_valid_i && wm.flagged && (cfg_gate_mode_i == GATE_ORIG_PG);
  assign cost_thr_dyn = CNT_W'(dyn_thr);
  assign cost_thr   = cfg_dyn_cost_i ? cost_thr_dyn : CNT_W'(COST_THR);

  // -------------------------------------------------------- dispatch side
  assign br_ok    = disp_br_valid_i && !flush;
  assign high_conf = cfg_conf_pattern_i ? ptn_high_conf : jrs_high_conf;
  assign low_conf  = !high_conf;

  always_comb begin
    unique case (cfg_gate_mode_i)
      GATE_ORIG_PG:  flagged = low_conf;
      GATE_PC_COST:  flagged = low_conf && pc_high;
      GATE_PATTERN:  flagged = low_conf && pat_high;
      GATE_LOCAL:    flagged = low_conf && loc_high;
      GATE_HCLC:     flagged = hclc_lchc;
      GATE_COMBINED: flagged = hclc_lchc && pat_high;
      default:       flagged = 1'b0;
    endcase
  end

  always_comb begin
    disp_br_o           = '0;
    disp_br_o.taken     = bp.taken;
    disp_br_o.low_conf  = low_conf;
    disp_br_o.high_cost = pat_high;
    disp_br_o.lchc      = flagged;
    disp_br_o.combined  = bp.combined;
    disp_br_o.rob_idx   = 7'(PTR_W'(alloc_idx + PTR_W'(disp_br_slot_i)));
  end

  always_ff @(posedge clk_i) begin
    if (br_ok) begin
      meta_q[PTR_W'(alloc_idx + PTR_W'(disp_br_slot_i))] <= '{
        pc: disp_br_pc_i, bp: bp, low_conf: low_conf, jrs_idx: jrs_idx,
        gchr_pat: pat_p, bp_pat: bpc_p, loc_pat: loc_p, flagged: flagged,
        study_hit: cat_hit, study_high: cat_high};
    end
  end

  // -------------------------------------------------------------- blocks
  rob_cost_tracker #(.DEPTH(ROB_DEPTH), .DISP_W(DISP_W), .COMMIT_W(DISP_W)) u_rob (
    .clk_i, .rst_ni,
    .disp_cnt_i       (disp_cnt_i),
    .disp_flag_valid_i(br_ok && flagged),
    .disp_flag_slot_i (disp_br_slot_i),
    .alloc_idx_o      (alloc_idx),
    .count_o          (rob_count),
    .free_o           (rob_free),
    .wb_idx_i         (wb_rob_idx_i[PTR_W-1:0]),
    .cost_thr_i       (cost_thr),
    .wb_cost_o        (wb_cost),
    .wb_high_cost_o   (wb_high),
    .flush_valid_i    (flush),
    .clr_valid_i      (clr),
    .commit_cnt_i     (commit_cnt_i),
    .flush_flag_cnt_o (flush_flags),
    .commit_flag_cnt_o(commit_flags)
  );

  cost_pattern_predictor #(.HIST_W(GCHR_W), .TRACK_HIGH(1'b1)) u_cost_pat (
    .clk_i, .rst_ni, .busy_o(busy_pat),
    .pred_high_cost_o(pat_high), .pred_pattern_o(pat_p),
    .upd_valid_i(wb_valid_i), .upd_pattern_i(wm.gchr_pat), .upd_high_cost_i(wb_high),
    .gchr_o()
  );

  cost_pattern_predictor #(.HIST_W(GCHR_W), .TRACK_HIGH(1'b0)) u_bp_cost_pat (
    .clk_i, .rst_ni, .busy_o(busy_bpc),
    .pred_high_cost_o(bpc_high), .pred_pattern_o(bpc_p),
    .upd_valid_i(wb_valid_i), .upd_pattern_i(wm.bp_pat),
    .upd_high_cost_i(wb_cost > CNT_W'(BP_COST_THR)),
    .gchr_o()
  );

  pc_cost_predictor u_cost_pc (
    .clk_i, .rst_ni, .busy_o(busy_pc),
    .pred_pc_i(disp_br_pc_i), .pred_high_cost_o(pc_high),
    .upd_valid_i(wb_valid_i), .upd_pc_i(wm.pc), .upd_high_cost_i(wb_high)
  );

  local_cost_history_predictor u_cost_loc (
    .clk_i, .rst_ni, .busy_o(busy_loc),
    .pred_pc_i(disp_br_pc_i), .pred_high_cost_o(loc_high), .pred_pattern_o(loc_p),
    .upd_valid_i(wb_valid_i), .upd_pc_i(wm.pc), .upd_pattern_i(wm.loc_pat), .upd_high_cost_i(wb_high)
  );

  hclc_estimator u_hclc (
    .clk_i, .rst_ni, .busy_o(busy_hclc),
    .pred_pc_i(disp_br_pc_i), .pred_low_conf_i(low_conf), .pred_lchc_o(hclc_lchc),
    .upd_valid_i(wb_valid_i), .upd_pc_i(wm.pc), .upd_high_cost_i(wb_high), .upd_low_conf_i(wm.low_conf)
  );

  jrs_conf_estimator #(.ENTRIES(JRS_ENTRIES), .GHR_W(BPI_W)) u_jrs (
    .clk_i, .rst_ni, .busy_o(busy_jrs),
    .pred_pc_i(disp_br_pc_i), .ghr_i(ghr), .pred_high_conf_o(jrs_high_conf), .pred_idx_o(jrs_idx),
    .upd_valid_i(wb_valid_i), .upd_idx_i(wm.jrs_idx), .upd_correct_i(!mispredict)
  );

  pattern_conf_estimator u_ptn_conf (
    .clk_i, .rst_ni,
    .pred_high_conf_o(ptn_high_conf), .pred_pattern_o(),
    .upd_valid_i(wb_valid_i), .upd_taken_i(wb_taken_i)
  );

  cost_combined_predictor #(.ENTRIES(BP_ENTRIES)) u_bp (
    .clk_i, .rst_ni, .busy_o(busy_bp),
    .pred_valid_i(br_ok), .pred_pc_i(disp_br_pc_i), .pred_high_cost_i(bpc_high), .pred_o(bp),
    .ghr_o(ghr),
    .upd_valid_i(wb_valid_i), .upd_pc_i(wm.pc), .upd_i(wm.bp), .upd_taken_i(wb_taken_i),
    .gshare_only_cnt_o(stats_o.gshare_only_cnt), .combined_cnt_o(stats_o.combined_cnt)
  );

  assign study_high = wb_cost > CNT_W'(STUDY_COST_THR);

  cost_analysis_table #(.ENTRIES(STUDY_ENTRIES)) u_cat (
    .clk_i, .rst_ni, .busy_o(busy_cat),
    .pred_pc_i(disp_br_pc_i), .pred_hit_o(cat_hit), .pred_high_cost_o(cat_high),
    .upd_valid_i(flush), .upd_pc_i(wm.pc), .upd_high_cost_i(study_high)
  );

  dyn_cost_threshold #(.INTERVAL(DYN_INTERVAL)) u_dyn_cost (
    .clk_i, .rst_ni,
    .flush_valid_i(flush), .flush_cost_i(8'(wb_cost)), .thr_o(dyn_thr)
  );

  pg_controller #(.CNT_W(8), .DEPTH(ROB_DEPTH)) u_pg (
    .clk_i, .rst_ni,
    .inc_i        (br_ok && flagged),
    .dec_n_i      (8'(flush_flags) + 8'(commit_flags) + 8'(clr)),
    .thr_i        ((cfg_gate_mode_i == GATE_ORIG_PG) ? 3'(THR_PG_ORIG) : 3'(THR_PG)),
    .dyn_en_i     (cfg_dyn_pg_i),
    .rob_count_i  (rob_count),
    .gate_o       (fetch_gate_o),
    .thr_o        (pg_thr),
    .cnt_o        (lchc_cnt),
    .gate_events_o(stats_o.gate_events),
    .gated_cycles_o(stats_o.gated_cycles)
  );

  // ------------------------------------------------------------- outputs
  assign rob_count_o  = 8'(rob_count);
  assign rob_free_o   = 8'(rob_free);
  assign wb_o.mispredict = mispredict;
  assign wb_o.cost       = 8'(wb_cost);
  assign wb_o.high_cost  = wb_high;

  assign stats_o.lchc_cnt = lchc_cnt;
  assign stats_o.cost_thr = 8'(cost_thr);
  assign stats_o.pg_thr   = pg_thr;

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      stats_o.mispredicts       <= '0;
      stats_o.high_cost_flushes <= '0;
      stats_o.study_hits        <= '0;
      stats_o.study_correct     <= '0;
    end else if (flush) begin
      stats_o.mispredicts <= stats_o.mispredicts + 32'd1;
      if (wb_high) stats_o.high_cost_flushes <= stats_o.high_cost_flushes + 32'd1;
      if (wm.study_hit) begin
        stats_o.study_hits <= stats_o.study_hits + 32'd1;
        if (wm.study_high == study_high) stats_o.study_correct <= stats_o.study_correct + 32'd1;
      end
    end
  end

endmodule
