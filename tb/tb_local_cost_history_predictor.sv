// Self-checking testbench for local_cost_history_predictor (16 local 4-bit
// cost histories indexed by PC[5:2], 16 x 2-bit up/down counters indexed by
// the history). A reference model of both tables is trained with random
// resolved branches; pattern and prediction are compared at every decode.
module tb_local_cost_history_predictor;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic busy, pred_high, upd_valid, upd_high;
  logic [31:0] pred_pc, upd_pc;
  logic [3:0] pat, upd_pat;
  int checks = 0, failures = 0;
  int m_ctr [16];
  logic [3:0] m_hist [16];

  local_cost_history_predictor dut (.clk_i(clk), .rst_ni(rst_n), .busy_o(busy), .pred_pc_i(pred_pc),
    .pred_high_cost_o(pred_high), .pred_pattern_o(pat), .upd_valid_i(upd_valid), .upd_pc_i(upd_pc),
    .upd_pattern_i(upd_pat), .upd_high_cost_i(upd_high));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    upd_valid = 0; upd_pc = 0; upd_high = 0; pred_pc = 0; upd_pat = 0;
    for (int i = 0; i < 16; i++) begin m_ctr[i] = 0; m_hist[i] = 0; end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    while (busy) @(posedge clk);
    #1;
    for (int n = 0; n < 4000; n++) begin
      logic [3:0] li;
      logic h;
      // few branches so histories repeat; cost depends on branch and history
      pred_pc = {$urandom_range(0, 3), 4'b0000} + 32'h100;
      li = pred_pc[5:2];
      #1;
      check(pat == m_hist[li], "local history matches model");
      check(pred_high == (m_ctr[m_hist[li]] >= 2), "prediction matches model");
      h = (m_hist[li][3:2] == 2'b01) ? 1'b1 : 1'($urandom_range(0, 3) == 0);
      upd_valid = 1; upd_pc = pred_pc; upd_pat = pat; upd_high = h;
      @(posedge clk); #1 upd_valid = 0;
      if (h) m_ctr[m_hist[li]] = (m_ctr[m_hist[li]] == 3) ? 3 : m_ctr[m_hist[li]] + 1;
      else   m_ctr[m_hist[li]] = (m_ctr[m_hist[li]] == 0) ? 0 : m_ctr[m_hist[li]] - 1;
      m_hist[li] = {h, m_hist[li][3:1]};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
