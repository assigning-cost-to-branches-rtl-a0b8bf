// dyn_cost_threshold: run-time choice of the cost threshold.
//
// Every flushing (mis-predicted) branch is counted in one of four cost
// regions: 0-31, 32-63, 64-95 and 96 or more flushed instructions. At the end
// of each INTERVAL-cycle window the region with the most branches sets the
// threshold that separates low-cost from high-cost branches for the next
// window: 16, 32, 64 or 96 respectively. The region counters then restart.
// Ties go to the lower region, a window without flushes keeps the current
// threshold, and the threshold starts at 32, the static value; these three
// points and counting branches rather than flushed instructions are this
// design's reading. A flush in the last cycle of a window is counted in the
// next window.
//
// Timing: thr_o is registered and changes one cycle after the window ends.
module dyn_cost_threshold #(
  parameter int unsigned INTERVAL = 8192,
  parameter int unsigned CNT_W    = 14
) (
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic       flush_valid_i,
  input  logic [7:0] flush_cost_i,
  output logic [7:0] thr_o
);

  localparam int unsigned CYC_W = $clog2(INTERVAL);

  logic [CNT_W-1:0] region_q [4];
  logic [CYC_W-1:0] cyc_q;
  logic [1:0]       region, best;
  logic [CNT_W-1:0] best_cnt;
  logic             window_end;

  assign region     = (flush_cost_i >= 8'd96) ? 2'd3 : flush_cost_i[6:5];
  assign window_end = 32'(cyc_q) == INTERVAL - 1;

  always_comb begin
    best     = 2'd0;
    best_cnt = region_q[0];
    for (int r = 1; r < 4; r++) begin
      if (region_q[r] > best_cnt) begin
        best     = 2'(r);
        best_cnt = region_q[r];
      end
    end
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      cyc_q <= '0;
      thr_o <= 8'd32;
      for (int r = 0; r < 4; r++) region_q[r] <= '0;
    end else begin
      cyc_q <= window_end ? '0 : cyc_q + 1'b1;
      if (window_end) begin
        if (best_cnt != '0) begin
          case (best)
            2'd0:    thr_o <= 8'd16;
            2'd1:    thr_o <= 8'd32;
            2'd2:    thr_o <= 8'd64;
            default: thr_o <= 8'd96;
          endcase
        end
        for (int r = 0; r < 4; r++)
          region_q[r] <= (flush_valid_i && region == 2'(r)) ? CNT_W'(1) : '0;
      end else if (flush_valid_i && region_q[region] != '1) begin
        region_q[region] <= region_q[region] + 1'b1;
      end
    end
  end

endmodule
