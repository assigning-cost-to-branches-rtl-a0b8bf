// hclc_estimator: high-cost / low-confidence confidence estimator.
//
// A table of ENTRIES small counters, indexed by low PC bits, remembers
// whether the high-cost branches mapping to each entry were low-confidence.
// At write-back only a high-cost branch touches the table: its counter moves
// up if the branch had been low-confidence and down (or to zero) otherwise.
// At decode a low-confidence branch whose counter is non-zero is reported as
// a likely high-cost/low-confidence (LCHC) branch and counted by pipeline
// gating. The 16-entry, 1-bit default is the evaluated size; indexing by PC
// and the counter kind are this design's choices (with 1-bit counters the
// two kinds behave alike).
//
// Timing: combinational decode answer, update at the next clock edge; the
// table clears itself for ENTRIES cycles after reset (busy_o).
module hclc_estimator #(
  parameter int unsigned         ENTRIES = 16,
  parameter int unsigned         CTR_W   = 1,
  parameter spec_pkg::ctr_kind_e KIND    = spec_pkg::CTR_UP_RESET,
  parameter int unsigned         PC_LSB  = 2,
  localparam int unsigned        IDX_W   = $clog2(ENTRIES)
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  output logic        busy_o,
  input  logic [31:0] pred_pc_i,
  input  logic        pred_low_conf_i,
  output logic        pred_lchc_o,
  input  logic        upd_valid_i,
  input  logic [31:0] upd_pc_i,
  input  logic        upd_high_cost_i,
  input  logic        upd_low_conf_i
);

  logic [CTR_W-1:0] rd_ctr;

  ctr_table #(.ENTRIES(ENTRIES), .CTR_W(CTR_W), .KIND(KIND), .INIT(8'd0)) u_tab (
    .clk_i, .rst_ni, .busy_o,
    .rd_idx_i   (pred_pc_i[PC_LSB +: IDX_W]),
    .rd_ctr_o   (rd_ctr),
    .upd_valid_i(upd_valid_i && upd_high_cost_i),
    .upd_idx_i  (upd_pc_i[PC_LSB +: IDX_W]),
    .upd_up_i   (upd_low_conf_i)
  );

  assign pred_lchc_o = pred_low_conf_i && (rd_ctr != '0);

endmodule
