// bimodal_predictor: PC-indexed table of 2-bit up/down counters.
//
// Low PC bits (from PC_LSB) select a counter; the branch is predicted taken
// when the counter is 2 or 3. At resolve the counter is incremented for a
// taken branch and decremented for a not-taken one, saturating at 0 and 3.
// It is the local component (p1) of the combined predictor. ENTRIES=8192
// reads the "8k combined predictor" of the evaluated processor as 8k entries
// per table; the weakly-not-taken start value is this design's choice.
//
// Timing: combinational prediction, update at the next clock edge; the table
// clears itself for ENTRIES cycles after reset (busy_o).
module bimodal_predictor #(
  parameter int unsigned  ENTRIES = 8192,
  parameter int unsigned  PC_LSB  = 2,
  localparam int unsigned IDX_W   = $clog2(ENTRIES)
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  output logic        busy_o,
  input  logic [31:0] pred_pc_i,
  output logic        pred_taken_o,
  input  logic        upd_valid_i,
  input  logic [31:0] upd_pc_i,
  input  logic        upd_taken_i
);

  logic [1:0] rd_ctr;

  ctr_table #(.ENTRIES(ENTRIES), .CTR_W(2), .KIND(spec_pkg::CTR_UP_DOWN), .INIT(8'd1)) u_tab (
    .clk_i, .rst_ni, .busy_o,
    .rd_idx_i   (pred_pc_i[PC_LSB +: IDX_W]),
    .rd_ctr_o   (rd_ctr),
    .upd_valid_i(upd_valid_i),
    .upd_idx_i  (upd_pc_i[PC_LSB +: IDX_W]),
    .upd_up_i   (upd_taken_i)
  );

  assign pred_taken_o = rd_ctr[1];

endmodule
