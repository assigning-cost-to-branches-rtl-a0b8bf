// gshare_predictor: global-history branch predictor.
//
// The global history register (GHR), the directions of the last IDX_W
// resolved branches, is exclusive-ored with low PC bits to index a table of
// 2-bit up/down counters; taken is predicted for counter values 2 and 3. The
// index is returned on pred_idx_o so the same counter is trained at
// resolve. Counter training (upd_*) and history shifting (hist_*) are
// separate ports because the cost-gated combined predictor always shifts the
// history but trains this table only when it used it. The history takes the
// newest direction at bit 0 and is updated at resolve, not speculatively.
// ENTRIES=8192 per the "8k" evaluated predictor; the start value weakly
// not-taken is this design's choice.
//
// Timing: combinational prediction, updates at the next clock edge; the
// table clears itself for ENTRIES cycles after reset (busy_o).
module gshare_predictor #(
  parameter int unsigned  ENTRIES = 8192,
  parameter int unsigned  PC_LSB  = 2,
  localparam int unsigned IDX_W   = $clog2(ENTRIES)
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  output logic             busy_o,
  input  logic [31:0]      pred_pc_i,
  output logic             pred_taken_o,
  output logic [IDX_W-1:0] pred_idx_o,
  output logic [IDX_W-1:0] ghr_o,
  input  logic             upd_valid_i,
  input  logic [IDX_W-1:0] upd_idx_i,
  input  logic             upd_taken_i,
  input  logic             hist_valid_i,
  input  logic             hist_taken_i
);

  logic [IDX_W-1:0] ghr_q;
  logic [1:0]       rd_ctr;

  assign pred_idx_o = pred_pc_i[PC_LSB +: IDX_W] ^ ghr_q;
  assign ghr_o      = ghr_q;

  ctr_table #(.ENTRIES(ENTRIES), .CTR_W(2), .KIND(spec_pkg::CTR_UP_DOWN), .INIT(8'd1)) u_tab (
    .clk_i, .rst_ni, .busy_o,
    .rd_idx_i   (pred_idx_o),
    .rd_ctr_o   (rd_ctr),
    .upd_valid_i(upd_valid_i),
    .upd_idx_i  (upd_idx_i),
    .upd_up_i   (upd_taken_i)
  );

  assign pred_taken_o = rd_ctr[1];

  always_ff @(posedge clk_i) begin
    if (!rst_ni)           ghr_q <= '0;
    else if (hist_valid_i) ghr_q <= {ghr_q[IDX_W-2:0], hist_taken_i};
  end

endmodule
