// jrs_conf_estimator: JRS (miss-distance counter) confidence estimator.
//
// The branch PC (from bit PC_LSB) exclusive-ored with the global branch
// history indexes a table of ENTRIES saturating counters, as in gshare. Each
// counter counts correct predictions of the branches that map to it: it is
// incremented when the prediction was correct and, for the default up/reset
// kind, cleared on a mis-prediction (KIND=CTR_UP_DOWN gives the up/down
// estimator variant). A branch is high-confidence when its counter is at
// least THR. The index used is returned on pred_idx_o, carried with the
// branch and handed back at write-back for the update. The 2-bit counter
// width follows the evaluated configuration; ENTRIES=1024 and THR=3 (a
// saturated counter) are this design's choices.
//
// Timing: combinational estimate, update at the next clock edge; the table
// clears itself for ENTRIES cycles after reset (busy_o), starting every
// branch at low confidence.
module jrs_conf_estimator #(
  parameter int unsigned         ENTRIES = 1024,
  parameter int unsigned         CTR_W   = 2,
  parameter int unsigned         THR     = 3,
  parameter spec_pkg::ctr_kind_e KIND    = spec_pkg::CTR_UP_RESET,
  parameter int unsigned         PC_LSB  = 2,
  parameter int unsigned         GHR_W   = 13,
  localparam int unsigned        IDX_W   = $clog2(ENTRIES)
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  output logic             busy_o,
  input  logic [31:0]      pred_pc_i,
  input  logic [GHR_W-1:0] ghr_i,
  output logic             pred_high_conf_o,
  output logic [IDX_W-1:0] pred_idx_o,
  input  logic             upd_valid_i,
  input  logic [IDX_W-1:0] upd_idx_i,
  input  logic             upd_correct_i
);

  logic [CTR_W-1:0] rd_ctr;
  logic [IDX_W-1:0] hist;

  // History folded to the index width (zero-extended when shorter).
  always_comb begin
    hist = '0;
    for (int i = 0; i < GHR_W; i++) hist[i % IDX_W] ^= ghr_i[i];
  end

  assign pred_idx_o = pred_pc_i[PC_LSB +: IDX_W] ^ hist;

  ctr_table #(.ENTRIES(ENTRIES), .CTR_W(CTR_W), .KIND(KIND), .INIT(8'd0)) u_mdc (
    .clk_i, .rst_ni, .busy_o,
    .rd_idx_i   (pred_idx_o),
    .rd_ctr_o   (rd_ctr),
    .upd_valid_i(upd_valid_i),
    .upd_idx_i  (upd_idx_i),
    .upd_up_i   (upd_correct_i)
  );

  assign pred_high_conf_o = 32'(rd_ctr) >= THR;

endmodule
