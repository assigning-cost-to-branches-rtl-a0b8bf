// Self-checking testbench for rob_cost_tracker (128 entries, 8-wide
// allocation and retirement). The reference model is an ordered list of the
// in-flight entries (ROB index and flag), independent of pointer arithmetic:
// a branch's cost is the number of list entries after it, a flush removes
// them, and retirement pops the front. Random allocation, retirement,
// write-backs with and without flush and flag clears are applied; the test
// makes sure the ROB fills up, wraps around, and that both high-cost and
// low-cost branches (threshold 32) and flagged flushes occur.
module tb_rob_cost_tracker;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] disp_cnt, commit_cnt, commit_flags;
  logic       flag_v, flush, clr, wb_high;
  logic [2:0] flag_slot;
  logic [6:0] alloc_idx, wb_idx;
  logic [7:0] count, free, cost_thr, wb_cost, flush_flags;
  int checks = 0, failures = 0;

  rob_cost_tracker dut (.clk_i(clk), .rst_ni(rst_n), .disp_cnt_i(disp_cnt), .disp_flag_valid_i(flag_v),
    .disp_flag_slot_i(flag_slot), .alloc_idx_o(alloc_idx), .count_o(count), .free_o(free),
    .wb_idx_i(wb_idx), .cost_thr_i(cost_thr), .wb_cost_o(wb_cost), .wb_high_cost_o(wb_high),
    .flush_valid_i(flush), .clr_valid_i(clr), .commit_cnt_i(commit_cnt),
    .flush_flag_cnt_o(flush_flags), .commit_flag_cnt_o(commit_flags));

  typedef struct { int idx; bit flag; } ent_t;
  ent_t q[$];
  int next_idx = 0;
  int n_full = 0, n_wrap = 0, n_high = 0, n_low = 0, n_flag_flush = 0, n_flag_commit = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    disp_cnt = 0; commit_cnt = 0; flag_v = 0; flush = 0; clr = 0; flag_slot = 0; wb_idx = 0; cost_thr = 8'd32;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      int d, c, p, exp_cost, exp_ff, exp_cf;
      bit do_wb, do_flush;
      // phase-dependent behaviour: fill, then drain
      d = ((n / 500) % 2 == 0) ? $urandom_range(0, 8) : $urandom_range(0, 2);
      if (d > 128 - q.size()) d = 128 - q.size();
      do_wb = q.size() > 0 && $urandom_range(0, 2) == 0;
      do_flush = do_wb && $urandom_range(0, 3) == 0;
      p = do_wb ? $urandom_range(0, q.size() - 1) : 0;
      c = ((n / 500) % 2 == 0) ? $urandom_range(0, 2) : $urandom_range(0, 8);
      if (c > q.size()) c = q.size();
      if (do_wb && c > p) c = p;
      disp_cnt = 4'(d);
      flag_v = d > 0 && $urandom_range(0, 1) == 1;
      flag_slot = flag_v ? 3'($urandom_range(0, d - 1)) : 3'd0;
      commit_cnt = 4'(c);
      flush = do_flush;
      clr = do_wb && !do_flush && $urandom_range(0, 1) == 1;
      wb_idx = do_wb ? 7'(q[p].idx) : 7'd0;
      #1;
      check(count == 8'(q.size()) && free == 8'(128 - q.size()), "occupancy");
      check(alloc_idx == 7'(next_idx), "allocation index");
      exp_cf = 0;
      for (int k = 0; k < c; k++) exp_cf += q[k].flag;
      check(commit_flags == 4'(exp_cf), "retired flag count");
      if (exp_cf > 0) n_flag_commit++;
      if (do_wb) begin
        exp_cost = q.size() - 1 - p;
        exp_ff = 0;
        for (int k = p + 1; k < q.size(); k++) exp_ff += q[k].flag;
        check(wb_cost == 8'(exp_cost), $sformatf("cost %0d expected %0d", wb_cost, exp_cost));
        check(wb_high == (exp_cost > 32), "cost class against threshold 32");
        if (do_flush) begin
          check(flush_flags == 8'(exp_ff), "flushed flag count");
          if (exp_ff > 0) n_flag_flush++;
          if (exp_cost > 32) n_high++; else n_low++;
        end else begin
          check(flush_flags == 8'd0, "no flushed flags without a flush");
        end
      end
      @(posedge clk); #1;
      // model update
      if (do_flush) begin
        while (q.size() > p + 1) void'(q.pop_back());
        next_idx = (q[p].idx + 1) % 128;
      end else begin
        for (int k = 0; k < d; k++) begin
          ent_t e;
          e.idx = next_idx; e.flag = flag_v && (k == int'(flag_slot));
          q.push_back(e);
          if (next_idx == 127) n_wrap++;
          next_idx = (next_idx + 1) % 128;
        end
      end
      if (clr) q[p].flag = 0;
      for (int k = 0; k < c; k++) void'(q.pop_front());
      if (q.size() == 128) n_full++;
      disp_cnt = 0; commit_cnt = 0; flush = 0; clr = 0; flag_v = 0;
    end
    check(n_full > 0, "ROB became full");
    check(n_wrap > 0, "pointers wrapped");
    check(n_high > 0 && n_low > 0, "high- and low-cost flushes");
    check(n_flag_flush > 0 && n_flag_commit > 0, "flagged entries flushed and retired");
    $display("full=%0d wrap=%0d high=%0d low=%0d", n_full, n_wrap, n_high, n_low);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
