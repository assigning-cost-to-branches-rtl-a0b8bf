// pg_controller: pipeline-gating counter and fetch gate.
//
// A counter holds the number of in-flight branches that the chosen filter
// marks as suspicious (low-confidence, or low-confidence and high-cost). It
// is incremented by inc_i when such a branch is decoded and decreased by
// dec_n_i when such branches leave (retire, are flushed, or, for the original
// scheme, are resolved). While the counter exceeds the threshold, gate_o
// tells the fetch unit to stop; a threshold of n therefore gates as soon as
// n+1 such branches are in flight.
//
// The threshold is thr_i, or with dyn_en_i one chosen from ROB occupancy:
// 3 below a quarter of DEPTH, 2 below a half, 1 below three quarters and 0
// above, so that an almost empty ROB is not starved and an almost full one
// does not take in more suspicious work. gate_events_o counts the cycles in
// which gating starts (the gating frequency) and gated_cycles_o the cycles
// spent gated. The quarter boundaries generalise the 0-31/32-63/64-95/96+
// ranges given for a 128-entry ROB; the counter width is this design's
// choice, and the counter saturates instead of wrapping.
//
// Timing: gate_o is combinational from the registered counter and the
// current threshold; the counter updates at the next clock edge.
module pg_controller #(
  parameter int unsigned  CNT_W = 8,
  parameter int unsigned  DEPTH = 128,
  localparam int unsigned ROB_W = $clog2(DEPTH + 1)
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             inc_i,
  input  logic [CNT_W-1:0] dec_n_i,
  input  logic [2:0]       thr_i,
  input  logic             dyn_en_i,
  input  logic [ROB_W-1:0] rob_count_i,
  output logic             gate_o,
  output logic [2:0]       thr_o,
  output logic [CNT_W-1:0] cnt_o,
  output logic [31:0]      gate_events_o,
  output logic [31:0]      gated_cycles_o
);

  logic [CNT_W-1:0] cnt_q;
  logic             gate_q;
  logic [CNT_W:0]   sum;

  always_comb begin
    if (!dyn_en_i)                                thr_o = thr_i;
    else if (32'(rob_count_i) < DEPTH / 4)        thr_o = 3'd3;
    else if (32'(rob_count_i) < DEPTH / 2)        thr_o = 3'd2;
    else if (32'(rob_count_i) < (3 * DEPTH) / 4)  thr_o = 3'd1;
    else                                          thr_o = 3'd0;
  end

  assign cnt_o  = cnt_q;
  assign gate_o = cnt_q > CNT_W'(thr_o);
  assign sum    = {1'b0, cnt_q} + (CNT_W + 1)'(inc_i);

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      cnt_q          <= '0;
      gate_q         <= 1'b0;
      gate_events_o  <= '0;
      gated_cycles_o <= '0;
    end else begin
      if (sum < (CNT_W + 1)'(dec_n_i))  cnt_q <= '0;
      else if (sum - (CNT_W + 1)'(dec_n_i) > (CNT_W + 1)'({CNT_W{1'b1}})) cnt_q <= '1;
      else                              cnt_q <= CNT_W'(sum - (CNT_W + 1)'(dec_n_i));
      gate_q <= gate_o;
      if (gate_o && !gate_q) gate_events_o  <= gate_events_o + 32'd1;
      if (gate_o)            gated_cycles_o <= gated_cycles_o + 32'd1;
    end
  end

  // Leaving branches are always branches that were counted.
  a_no_underflow: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (CNT_W + 1)'(dec_n_i) <= sum);

endmodule
