// local_cost_history_predictor: two-level (per-branch history) cost predictor.
//
// The first table, LHT_ENTRIES shift registers indexed by low PC bits, holds
// the last HIST_W cost classes (1 = high cost) of the branches mapping to
// each entry. At decode the history of the branch indexes the second table,
// 2**HIST_W saturating counters, which gives the predicted class. The history
// used is returned on pred_pattern_o and handed back at write-back, where the
// counter it selected is trained with the measured class and the class is
// shifted into the branch's history register (at the most significant end,
// as the global cost history does). Defaults, 16-entry tables and 2-bit
// up/down counters tracking high cost, are the best configuration reported
// for this predictor; HIST_W=4 follows from the 16-entry counter table.
//
// Timing: combinational prediction, update at the next clock edge. Reset
// clears the histories; the counter table clears itself (busy_o).
module local_cost_history_predictor #(
  parameter int unsigned         LHT_ENTRIES = 16,
  parameter int unsigned         HIST_W      = 4,
  parameter int unsigned         CTR_W       = 2,
  parameter spec_pkg::ctr_kind_e KIND        = spec_pkg::CTR_UP_DOWN,
  parameter bit                  TRACK_HIGH  = 1'b1,
  parameter int unsigned         PRED_THR    = 1,
  parameter int unsigned         PC_LSB      = 2,
  localparam int unsigned        LIDX_W      = $clog2(LHT_ENTRIES)
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  output logic              busy_o,
  input  logic [31:0]       pred_pc_i,
  output logic              pred_high_cost_o,
  output logic [HIST_W-1:0] pred_pattern_o,
  input  logic              upd_valid_i,
  input  logic [31:0]       upd_pc_i,
  input  logic [HIST_W-1:0] upd_pattern_i,
  input  logic              upd_high_cost_i
);

  logic [HIST_W-1:0] lht [LHT_ENTRIES];
  logic [CTR_W-1:0]  rd_ctr;
  logic              tracked_pred;
  logic [LIDX_W-1:0] upd_lidx;

  assign pred_pattern_o = lht[pred_pc_i[PC_LSB +: LIDX_W]];
  assign upd_lidx       = upd_pc_i[PC_LSB +: LIDX_W];

  ctr_table #(.ENTRIES(2 ** HIST_W), .CTR_W(CTR_W), .KIND(KIND), .INIT(8'd0)) u_pht (
    .clk_i, .rst_ni, .busy_o,
    .rd_idx_i   (pred_pattern_o),
    .rd_ctr_o   (rd_ctr),
    .upd_valid_i(upd_valid_i),
    .upd_idx_i  (upd_pattern_i),
    .upd_up_i   (upd_high_cost_i == TRACK_HIGH)
  );

  assign tracked_pred     = 32'(rd_ctr) > PRED_THR;
  assign pred_high_cost_o = TRACK_HIGH ? tracked_pred : !tracked_pred;

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      for (int i = 0; i < LHT_ENTRIES; i++) lht[i] <= '0;
    end else if (upd_valid_i && !busy_o) begin
      lht[upd_lidx] <= {upd_high_cost_i, lht[upd_lidx][HIST_W-1:1]};
    end
  end

endmodule
