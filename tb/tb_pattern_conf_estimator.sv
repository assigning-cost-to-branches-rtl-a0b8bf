// Self-checking testbench for pattern_conf_estimator.
//
// Two instances see the same resolved directions: the default one (high
// confidence when 3 or 4 of the last 4 branches were taken) and one set to
// 4 of 4 ("always taken" only). The testbench first checks every 4-bit
// pattern by shifting it in and comparing with the two rules, including the
// five patterns the schemes name as high confidence. It then checks random
// traffic with idle cycles against its own list of the last four directions,
// and checks that a cycle without an update leaves the pattern alone.
module tb_pattern_conf_estimator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic       hc3, hc4, upd_valid, upd_taken;
  logic [3:0] pat3, pat4;
  int checks = 0, failures = 0;
  bit m_hist [$];

  pattern_conf_estimator dut (.clk_i(clk), .rst_ni(rst_n), .pred_high_conf_o(hc3),
    .pred_pattern_o(pat3), .upd_valid_i(upd_valid), .upd_taken_i(upd_taken));
  pattern_conf_estimator #(.MIN_TAKEN(4)) dut4 (.clk_i(clk), .rst_ni(rst_n), .pred_high_conf_o(hc4),
    .pred_pattern_o(pat4), .upd_valid_i(upd_valid), .upd_taken_i(upd_taken));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int taken_in_model();
    int n = 0;
    foreach (m_hist[i]) n += m_hist[i];
    return n;
  endfunction

  task automatic resolve(input bit t);
    upd_valid = 1; upd_taken = t;
    @(posedge clk); #1 upd_valid = 0;
    m_hist.push_back(t);
    if (m_hist.size() > 4) void'(m_hist.pop_front());
  endtask

  task automatic compare(input string what);
    int n;
    logic [3:0] exp_pat;
    n = taken_in_model();
    exp_pat = '0;
    foreach (m_hist[i]) exp_pat[m_hist.size() - 1 - i] = m_hist[i];
    check(pat3 == exp_pat && pat4 == exp_pat, $sformatf("%s: pattern %b expected %b", what, pat3, exp_pat));
    check(hc3 == (n >= 3), $sformatf("%s: 3-of-4 rule on %b", what, pat3));
    check(hc4 == (n == 4), $sformatf("%s: always-taken rule on %b", what, pat4));
  endtask

  initial begin
    upd_valid = 0; upd_taken = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    #1 check(!hc3 && !hc4 && pat3 == 4'b0000, "cleared by reset: low confidence");
    // every pattern, shifted in from a cleared register
    for (int p = 0; p < 16; p++) begin
      for (int b = 3; b >= 0; b--) resolve(p[b]);
      compare($sformatf("pattern %0d", p));
      if (p == 15) check(hc3 && hc4, "1111 is high confidence for both");
      if (p == 14 || p == 13 || p == 11 || p == 7) check(hc3 && !hc4, "almost taken: only the 3-of-4 rule");
      if (p == 0) check(!hc3 && !hc4, "0000 is low confidence");
    end
    // random traffic with idle cycles
    for (int n = 0; n < 4000; n++) begin
      if ($urandom_range(0, 3) == 0) begin
        logic [3:0] before_idle;
        before_idle = pat3;
        @(posedge clk); #1;
        check(pat3 == before_idle, "no update, no change");
      end else begin
        resolve(($urandom_range(0, 9) < 7));
      end
      compare("random");
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
