// cost_combined_predictor: combined (tournament) branch predictor whose
// bimodal half is switched off for branches predicted low-cost.
//
// p1 is a bimodal predictor, p2 a gshare predictor, and a PC-indexed chooser
// of 2-bit up/down counters picks p1 for values 0/1 and p2 for 2/3. The
// chooser moves towards p2 when only p2 was right and towards p1 when only
// p1 was right. With COST_GATING=1 the cost class of the branch, predicted by
// a cost predictor outside this module, steers the access (the "Mux1" of the
// scheme): a high-cost branch uses the full combined predictor, a low-cost
// branch uses gshare alone and the bimodal table and chooser are neither read
// nor trained for it. pred_o.combined records which path was used; the
// pipeline hands pred_o back at resolve (upd_i) so that training follows the
// same path. The gshare history is shifted by every resolved branch. The
// access counters count predictions served by each path, the quantity that
// sets the predictor's power. COST_GATING=0 gives the plain combined
// predictor. Training the chooser only on the combined path is this design's
// choice.
//
// Timing: combinational prediction; training at the next clock edge; the
// three tables clear themselves after reset (busy_o, ENTRIES cycles).
module cost_combined_predictor #(
  parameter int unsigned  ENTRIES     = 8192,
  parameter bit           COST_GATING = 1'b1,
  parameter int unsigned  PC_LSB      = 2,
  localparam int unsigned IDX_W       = $clog2(ENTRIES)
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  output logic               busy_o,
  input  logic               pred_valid_i,
  input  logic [31:0]        pred_pc_i,
  input  logic               pred_high_cost_i,
  output spec_pkg::bp_pred_t pred_o,
  output logic [IDX_W-1:0]   ghr_o,
  input  logic               upd_valid_i,
  input  logic [31:0]        upd_pc_i,
  input  spec_pkg::bp_pred_t upd_i,
  input  logic               upd_taken_i,
  output logic [31:0]        gshare_only_cnt_o,
  output logic [31:0]        combined_cnt_o
);

  logic             busy_bi, busy_gs, busy_ch;
  logic             p1, p2;
  logic [IDX_W-1:0] gs_idx;
  logic [1:0]       ch_ctr;
  logic             use_comb;

  bimodal_predictor #(.ENTRIES(ENTRIES), .PC_LSB(PC_LSB)) u_p1 (
    .clk_i, .rst_ni, .busy_o(busy_bi),
    .pred_pc_i   (pred_pc_i),
    .pred_taken_o(p1),
    .upd_valid_i (upd_valid_i && upd_i.combined),
    .upd_pc_i    (upd_pc_i),
    .upd_taken_i (upd_taken_i)
  );

  gshare_predictor #(.ENTRIES(ENTRIES), .PC_LSB(PC_LSB)) u_p2 (
    .clk_i, .rst_ni, .busy_o(busy_gs),
    .pred_pc_i   (pred_pc_i),
    .pred_taken_o(p2),
    .pred_idx_o  (gs_idx),
    .ghr_o       (ghr_o),
    .upd_valid_i (upd_valid_i),
    .upd_idx_i   (upd_i.gs_idx[IDX_W-1:0]),
    .upd_taken_i (upd_taken_i),
    .hist_valid_i(upd_valid_i),
    .hist_taken_i(upd_taken_i)
  );

  ctr_table #(.ENTRIES(ENTRIES), .CTR_W(2), .KIND(spec_pkg::CTR_UP_DOWN), .INIT(8'd1)) u_chooser (
    .clk_i, .rst_ni, .busy_o(busy_ch),
    .rd_idx_i   (pred_pc_i[PC_LSB +: IDX_W]),
    .rd_ctr_o   (ch_ctr),
    .upd_valid_i(upd_valid_i && upd_i.combined && (upd_i.p1 != upd_i.p2)),
    .upd_idx_i  (upd_pc_i[PC_LSB +: IDX_W]),
    .upd_up_i   (upd_i.p2 == upd_taken_i)
  );

  assign busy_o   = busy_bi || busy_gs || busy_ch;
  assign use_comb = COST_GATING ? pred_high_cost_i : 1'b1;

  always_comb begin
    pred_o          = '0;
    pred_o.p1       = p1;
    pred_o.p2       = p2;
    pred_o.gs_idx   = 13'(gs_idx);
    pred_o.combined = use_comb;
    pred_o.taken    = (use_comb && !ch_ctr[1]) ? p1 : p2;
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      gshare_only_cnt_o <= '0;
      combined_cnt_o    <= '0;
    end else if (pred_valid_i) begin
      if (use_comb) combined_cnt_o    <= combined_cnt_o + 32'd1;
      else          gshare_only_cnt_o <= gshare_only_cnt_o + 32'd1;
    end
  end

endmodule
