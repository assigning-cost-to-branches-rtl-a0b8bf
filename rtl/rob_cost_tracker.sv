// rob_cost_tracker: re-order-buffer pointers and branch-cost measurement.
//
// The re-order buffer (ROB) is a DEPTH-entry circular queue. Instructions are
// allocated at the head pointer (up to DISP_W per cycle) and retired from the
// tail pointer (up to COMMIT_W per cycle); this module keeps only the two
// pointers, the occupancy and one flag bit per entry, not the instructions.
//
// The cost of a branch is the number of ROB entries a mis-prediction of it
// would flush: the entries allocated after it, i.e. between the branch and
// the head pointer. For the branch at wb_idx_i it is
//     wb_cost_o = (head - wb_idx_i - 1) mod DEPTH
// and the branch is high cost when wb_cost_o > cost_thr_i (a cost equal to
// the threshold is low cost). The cost is reported for every resolved branch,
// mis-predicted or not. When flush_valid_i is set those entries are dropped
// and the head pointer moves to the entry after the branch; allocation
// requested in the same cycle is wrong-path and is ignored.
//
// The flag bit of an entry marks a branch that the pipeline-gating counter
// has counted. A new entry's flag is set when it is the slot named by
// disp_flag_slot_i; clr_valid_i clears the flag at wb_idx_i. The module
// reports how many flagged entries leave this cycle, by retirement
// (commit_flag_cnt_o) and by a flush (flush_flag_cnt_o), so the gating
// counter can be decremented. The pointer naming (head = allocation) follows
// the cost-measurement description; the flag bits are this design's means of
// decrementing the gating counter.
//
// Timing: all outputs are combinational from registered state and the
// current inputs; state changes at the next clock edge. Retirement in the
// cycle of a flush must only retire entries older than the branch.
module rob_cost_tracker #(
  parameter int unsigned  DEPTH    = 128,
  parameter int unsigned  DISP_W   = 8,
  parameter int unsigned  COMMIT_W = 8,
  localparam int unsigned PTR_W    = $clog2(DEPTH),
  localparam int unsigned CNT_W    = $clog2(DEPTH + 1),
  localparam int unsigned DW_W     = $clog2(DISP_W + 1),
  localparam int unsigned CW_W     = $clog2(COMMIT_W + 1),
  localparam int unsigned SLOT_W   = (DISP_W > 1) ? $clog2(DISP_W) : 1
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // allocation
  input  logic [DW_W-1:0]   disp_cnt_i,
  input  logic              disp_flag_valid_i,
  input  logic [SLOT_W-1:0] disp_flag_slot_i,
  output logic [PTR_W-1:0]  alloc_idx_o,
  output logic [CNT_W-1:0]  count_o,
  output logic [CNT_W-1:0]  free_o,
  // write-back of a branch
  input  logic [PTR_W-1:0]  wb_idx_i,
  input  logic [CNT_W-1:0]  cost_thr_i,
  output logic [CNT_W-1:0]  wb_cost_o,
  output logic              wb_high_cost_o,
  input  logic              flush_valid_i,
  input  logic              clr_valid_i,
  // retirement
  input  logic [CW_W-1:0]   commit_cnt_i,
  output logic [CNT_W-1:0]  flush_flag_cnt_o,
  output logic [CW_W-1:0]   commit_flag_cnt_o
);

  logic [PTR_W-1:0] head_q, tail_q;
  logic [CNT_W-1:0] count_q;
  logic [DEPTH-1:0] flag_q;

  assign alloc_idx_o    = head_q;
  assign count_o        = count_q;
  assign free_o         = CNT_W'(DEPTH) - count_q;
  assign wb_cost_o      = CNT_W'(PTR_W'(head_q - wb_idx_i - 1'b1));
  assign wb_high_cost_o = wb_cost_o > cost_thr_i;

  always_comb begin
    logic [PTR_W-1:0] age;
    flush_flag_cnt_o = '0;
    for (int i = 0; i < DEPTH; i++) begin
      age = PTR_W'(PTR_W'(i) - wb_idx_i - 1'b1);
      if (flush_valid_i && CNT_W'(age) < wb_cost_o && flag_q[i]) flush_flag_cnt_o += 1'b1;
    end
  end

  always_comb begin
    commit_flag_cnt_o = '0;
    for (int k = 0; k < COMMIT_W; k++) begin
      if (CW_W'(k) < commit_cnt_i && flag_q[PTR_W'(tail_q + PTR_W'(k))]) commit_flag_cnt_o += 1'b1;
    end
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
      flag_q  <= '0;
    end else begin
      tail_q <= tail_q + PTR_W'(commit_cnt_i);
      if (flush_valid_i) begin
        head_q  <= wb_idx_i + 1'b1;
        count_q <= count_q - wb_cost_o - CNT_W'(commit_cnt_i);
      end else begin
        head_q  <= head_q + PTR_W'(disp_cnt_i);
        count_q <= count_q + CNT_W'(disp_cnt_i) - CNT_W'(commit_cnt_i);
        for (int k = 0; k < DISP_W; k++) begin
          if (DW_W'(k) < disp_cnt_i)
            flag_q[PTR_W'(head_q + PTR_W'(k))] <= disp_flag_valid_i && (SLOT_W'(k) == disp_flag_slot_i);
        end
      end
      if (clr_valid_i) flag_q[wb_idx_i] <= 1'b0;
    end
  end

  // Allocation and retirement must stay within the queue.
  a_no_overflow: assert property (@(posedge clk_i) disable iff (!rst_ni)
    flush_valid_i || (CNT_W'(disp_cnt_i) <= free_o));
  a_no_underflow: assert property (@(posedge clk_i) disable iff (!rst_ni)
    CNT_W'(commit_cnt_i) <= count_q);
  a_slot_in_group: assert property (@(posedge clk_i) disable iff (!rst_ni)
    !disp_flag_valid_i || (DW_W'(disp_flag_slot_i) < disp_cnt_i));

endmodule
