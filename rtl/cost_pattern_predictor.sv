// cost_pattern_predictor: global cost pattern predictor.
//
// A HIST_W-bit Global Cost History Register (GCHR) holds the cost classes
// (1 = high cost) of the most recently resolved branches. At decode the GCHR
// value indexes a table of 2**HIST_W saturating counters; the counter decides
// whether the branch is predicted high cost. The GCHR value is returned on
// pred_pattern_o so that the pipeline can keep it with the branch and hand it
// back at write-back, when the same counter is trained with the branch's
// measured cost class and the class is shifted into the GCHR.
//
// The GCHR shifts towards the least significant bit and takes the new class
// at the most significant end, so 0100 becomes 1010 after a high-cost branch
// and 1010 becomes 0101 after a low-cost one; the pattern read as a binary
// number is the table entry. With TRACK_HIGH=1 (used for pipeline gating)
// the counters count high-cost branches and "high cost" is predicted when the
// counter is above PRED_THR; with TRACK_HIGH=0 (used to steer the combined
// branch predictor) they count low-cost branches and "high cost" is predicted
// when the counter is at or below PRED_THR. The defaults (4-bit GCHR, 16
// entries of 2-bit up/reset counters) are the configuration the evaluation
// found best. Reset clears the GCHR; the table clears itself (busy_o) for
// 2**HIST_W cycles.
//
// Timing: prediction is combinational from registered state; the update
// takes effect at the next clock edge.
module cost_pattern_predictor #(
  parameter int unsigned         HIST_W     = 4,
  parameter int unsigned         CTR_W      = 2,
  parameter spec_pkg::ctr_kind_e KIND       = spec_pkg::CTR_UP_RESET,
  parameter bit                  TRACK_HIGH = 1'b1,
  parameter int unsigned         PRED_THR   = 1
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  output logic              busy_o,
  output logic              pred_high_cost_o,
  output logic [HIST_W-1:0] pred_pattern_o,
  input  logic              upd_valid_i,
  input  logic [HIST_W-1:0] upd_pattern_i,
  input  logic              upd_high_cost_i,
  output logic [HIST_W-1:0] gchr_o
);

  logic [HIST_W-1:0] gchr_q;
  logic [CTR_W-1:0]  rd_ctr;
  logic              tracked_pred;

  ctr_table #(
    .ENTRIES(2 ** HIST_W), .CTR_W(CTR_W), .KIND(KIND), .INIT(8'd0)
  ) u_tab (
    .clk_i, .rst_ni, .busy_o,
    .rd_idx_i   (gchr_q),
    .rd_ctr_o   (rd_ctr),
    .upd_valid_i(upd_valid_i),
    .upd_idx_i  (upd_pattern_i),
    .upd_up_i   (upd_high_cost_i == TRACK_HIGH)
  );

  assign tracked_pred     = 32'(rd_ctr) > PRED_THR;
  assign pred_high_cost_o = TRACK_HIGH ? tracked_pred : !tracked_pred;
  assign pred_pattern_o   = gchr_q;
  assign gchr_o           = gchr_q;

  always_ff @(posedge clk_i) begin
    if (!rst_ni)          gchr_q <= '0;
    else if (upd_valid_i && !busy_o) gchr_q <= {upd_high_cost_i, gchr_q[HIST_W-1:1]};
  end

endmodule
