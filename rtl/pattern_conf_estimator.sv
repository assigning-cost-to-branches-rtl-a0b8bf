// pattern_conf_estimator: confidence from the pattern of recent outcomes.
//
// A HIST_W-bit shift register holds the directions (1 = taken) of the last
// HIST_W resolved branches. At decode, the pattern alone gives the
// confidence: the branch is high-confidence when at least MIN_TAKEN of those
// branches were taken, and low-confidence otherwise. With the default
// 4-bit pattern, MIN_TAKEN=4 accepts only "always taken" (1111), the first
// of the two estimators described for this scheme; MIN_TAKEN=3 also accepts
// the "almost taken" patterns (1110, 1101, 1011, 0111), the second one. Every
// other pattern, including 0000, is low confidence. The estimator needs no
// table, which is why it costs almost nothing next to a JRS table.
//
// The 4-bit pattern and both estimator rules follow the description of the
// scheme. The choice of the second estimator as the default, the use of the
// global outcome sequence (not a per-branch one) and updating the pattern
// at resolve rather than at fetch are this design's choices.
//
// Interface: pred_high_conf_o and pred_pattern_o are combinational from the
// register; upd_valid_i/upd_taken_i shift one resolved direction in at the
// next clock edge (newest at bit 0). Reset clears the pattern, so the first
// branches are low-confidence.
module pattern_conf_estimator #(
  parameter int unsigned HIST_W    = 4,
  parameter int unsigned MIN_TAKEN = 3
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  output logic              pred_high_conf_o,
  output logic [HIST_W-1:0] pred_pattern_o,
  input  logic              upd_valid_i,
  input  logic              upd_taken_i
);

  logic [HIST_W-1:0] hist_q;
  int unsigned       n_taken;

  always_comb begin
    n_taken = 0;
    for (int i = 0; i < int'(HIST_W); i++) n_taken += 32'(hist_q[i]);
  end

  assign pred_high_conf_o = n_taken >= MIN_TAKEN;
  assign pred_pattern_o   = hist_q;

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      hist_q <= '0;
    end else if (upd_valid_i) begin
      hist_q <= {hist_q[HIST_W-2:0], upd_taken_i};
    end
  end

endmodule
