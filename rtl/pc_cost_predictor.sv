// pc_cost_predictor: global (PC-indexed) cost predictor.
//
// Low bits of the branch PC (starting at PC_LSB) index a table of ENTRIES
// saturating counters. At decode the counter gives the predicted cost class;
// at write-back the counter of the resolved branch is moved up when the
// branch's measured class is the tracked one (high cost when TRACK_HIGH=1)
// and down or to zero otherwise, depending on KIND. High cost is predicted
// when a high-tracking counter is above PRED_THR (a low-tracking one at or
// below it). Defaults, 16 entries of 2-bit up/reset counters tracking high
// cost, are the best configuration reported for this predictor; PC_LSB=2
// (4-byte instructions) is this design's choice.
//
// Timing: combinational prediction, update at the next clock edge; the table
// clears itself for ENTRIES cycles after reset (busy_o).
module pc_cost_predictor #(
  parameter int unsigned         ENTRIES    = 16,
  parameter int unsigned         CTR_W      = 2,
  parameter spec_pkg::ctr_kind_e KIND       = spec_pkg::CTR_UP_RESET,
  parameter bit                  TRACK_HIGH = 1'b1,
  parameter int unsigned         PRED_THR   = 1,
  parameter int unsigned         PC_LSB     = 2,
  localparam int unsigned        IDX_W      = $clog2(ENTRIES)
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  output logic        busy_o,
  input  logic [31:0] pred_pc_i,
  output logic        pred_high_cost_o,
  input  logic        upd_valid_i,
  input  logic [31:0] upd_pc_i,
  input  logic        upd_high_cost_i
);

  logic [CTR_W-1:0] rd_ctr;
  logic             tracked_pred;

  ctr_table #(.ENTRIES(ENTRIES), .CTR_W(CTR_W), .KIND(KIND), .INIT(8'd0)) u_tab (
    .clk_i, .rst_ni, .busy_o,
    .rd_idx_i   (pred_pc_i[PC_LSB +: IDX_W]),
    .rd_ctr_o   (rd_ctr),
    .upd_valid_i(upd_valid_i),
    .upd_idx_i  (upd_pc_i[PC_LSB +: IDX_W]),
    .upd_up_i   (upd_high_cost_i == TRACK_HIGH)
  );

  assign tracked_pred     = 32'(rd_ctr) > PRED_THR;
  assign pred_high_cost_o = TRACK_HIGH ? tracked_pred : !tracked_pred;

endmodule
