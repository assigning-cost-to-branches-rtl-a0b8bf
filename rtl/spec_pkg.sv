// spec_pkg: types, constants and the saturating-counter rule shared by the
// speculation-control unit.
//
// Every predictor and estimator here is a table of small saturating
// counters. Two counter kinds are used:
//   * up/down  : +1 on the tracked event, -1 otherwise, clamped at 0 and max
//   * up/reset : +1 on the tracked event, cleared to 0 otherwise
// A counter that tracks high cost predicts "high cost" when it is above
// PRED_THR (1 for 2-bit counters, i.e. values 2 and 3); one that tracks low
// cost predicts "high cost" when it is at or below PRED_THR.
//
// The default numbers (128-entry re-order buffer, 8-wide dispatch, cost
// threshold 32, gating threshold 1, 4-bit cost history) are those of the
// evaluated processor; the branch-metadata layout is this design's own.
package spec_pkg;

  typedef enum logic {
    CTR_UP_DOWN  = 1'b0,
    CTR_UP_RESET = 1'b1
  } ctr_kind_e;

  // Which branches feed the pipeline-gating counter.
  typedef enum logic [2:0] {
    GATE_OFF      = 3'd0,  // no gating
    GATE_ORIG_PG  = 3'd1,  // low-confidence branches only (original gating)
    GATE_PC_COST  = 3'd2,  // low confidence and PC-indexed cost predictor high
    GATE_PATTERN  = 3'd3,  // low confidence and global cost pattern predictor high
    GATE_LOCAL    = 3'd4,  // low confidence and local cost history predictor high
    GATE_HCLC     = 3'd5,  // low confidence and HCLC table set
    GATE_COMBINED = 3'd6   // low confidence, HCLC set and pattern predictor high
  } gate_mode_e;

  localparam int unsigned PC_W = 32;

  // Next value of a CTR_W-bit saturating counter (CTR_W <= 8).
  function automatic logic [7:0] ctr_next(input logic [7:0] cur, input logic up,
                                          input ctr_kind_e kind, input int unsigned ctr_w);
    logic [7:0] maxv;
    maxv = 8'((9'd1 << ctr_w) - 9'd1);
    if (up) begin
      ctr_next = (cur >= maxv) ? maxv : cur + 8'd1;
    end else if (kind == CTR_UP_RESET) begin
      ctr_next = 8'd0;
    end else begin
      ctr_next = (cur == 8'd0) ? 8'd0 : cur - 8'd1;
    end
  endfunction

  // Prediction returned by the cost-gated combined branch predictor and kept
  // with the branch until write-back.
  typedef struct packed {
    logic        taken;      // final direction
    logic        p1;         // bimodal direction
    logic        p2;         // gshare direction
    logic        combined;   // 1: chooser path used (high cost), 0: gshare only
    logic [12:0] gs_idx;     // gshare table index used
  } bp_pred_t;

  // Everything the unit remembers about one in-flight branch.
  typedef struct packed {
    logic [PC_W-1:0] pc;
    bp_pred_t        bp;
    logic            low_conf;
    logic [9:0]      jrs_idx;
    logic [3:0]      gchr_pat;   // gating cost pattern predictor
    logic [3:0]      bp_pat;     // branch-predictor cost pattern predictor
    logic [3:0]      loc_pat;    // local cost history
    logic            flagged;    // counted by the gating counter
    logic            study_hit;  // cost analysis table had an entry for the PC
    logic            study_high; // and predicted high cost
  } br_meta_t;

  // Dispatch-side answer for the branch of the current dispatch group.
  typedef struct packed {
    logic       taken;
    logic       low_conf;
    logic       high_cost;   // cost predictor used for gating (pattern predictor)
    logic       lchc;        // counted by the gating counter
    logic       combined;    // combined predictor path used
    logic [6:0] rob_idx;
  } disp_resp_t;

  // Write-back answer.
  typedef struct packed {
    logic       mispredict;
    logic [7:0] cost;
    logic       high_cost;   // cost > gating cost threshold
  } wb_resp_t;

  typedef struct packed {
    logic [31:0] gate_events;
    logic [31:0] gated_cycles;
    logic [7:0]  lchc_cnt;
    logic [7:0]  cost_thr;
    logic [2:0]  pg_thr;
    logic [31:0] gshare_only_cnt;
    logic [31:0] combined_cnt;
    logic [31:0] mispredicts;
    logic [31:0] high_cost_flushes;
    logic [31:0] study_hits;     // mis-predictions the cost analysis table had predicted
    logic [31:0] study_correct;  // of those, predicted class was right
  } stats_t;

endpackage
