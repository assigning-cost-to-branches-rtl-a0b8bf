// Self-checking testbench for dyn_cost_threshold (8192-cycle windows).
// Each window is filled with flushes whose costs favour one region; the
// threshold read one cycle after the window ends must be 16, 32, 64 or 96 for
// regions 0-31, 32-63, 64-95 and 96+, an empty window must keep the
// threshold, and a tie must pick the lower region. The threshold must not
// change inside a window.
module tb_dyn_cost_threshold;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic fv;
  logic [7:0] cost, thr;
  int checks = 0, failures = 0;

  dyn_cost_threshold dut (.clk_i(clk), .rst_ni(rst_n), .flush_valid_i(fv), .flush_cost_i(cost), .thr_o(thr));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one window; dominant region r gets ~3x the flushes of the others.
  // r = -1: no flushes; r = 4: equal counts in regions 1 and 2.
  task automatic window(input int r, input int exp_thr);
    logic [7:0] thr0;
    int cnt[4];
    thr0 = thr;
    cnt = '{0, 0, 0, 0};
    for (int c = 0; c < 8192; c++) begin
      int reg_sel;
      fv = 0; cost = 0;
      if (r == 4) begin
        if (c < 200) begin fv = 1; reg_sel = (c % 2) + 1; end
      end else if (r >= 0 && c < 8191 && $urandom_range(0, 3) == 0) begin
        fv = 1;
        reg_sel = ($urandom_range(0, 3) == 0) ? $urandom_range(0, 3) : r;
        if (cnt[reg_sel] + 1 >= cnt[r] && reg_sel != r) reg_sel = r;
      end
      if (fv) begin
        cnt[reg_sel]++;
        cost = (reg_sel == 3) ? 8'($urandom_range(96, 127)) : 8'(reg_sel * 32 + $urandom_range(0, 31));
      end
      @(posedge clk); #1;
      if (c < 8191) check(thr == thr0, "threshold stable inside the window");
    end
    fv = 0;
    check(thr == 8'(exp_thr), $sformatf("threshold %0d expected %0d", thr, exp_thr));
  endtask

  initial begin
    fv = 0; cost = 0;
    @(posedge clk); #1 rst_n = 1;
    check(thr == 8'd32, "starts at 32");
    window(3, 96);
    window(-1, 96);
    window(0, 16);
    window(2, 64);
    window(1, 32);
    window(4, 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
