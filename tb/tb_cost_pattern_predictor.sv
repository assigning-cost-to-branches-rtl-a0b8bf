// Self-checking testbench for cost_pattern_predictor (default configuration:
// 4-bit GCHR, 16 x 2-bit up/reset counters tracking high cost).
// A reference model of the GCHR and counter table runs beside the DUT. The
// test first replays the worked GCHR example (0100 -> 1010 after a high-cost
// branch -> 0101 after a low-cost one), then applies random resolved
// branches and compares prediction and pattern every cycle. It also checks
// the initialisation time of 16 cycles.
module tb_cost_pattern_predictor;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       busy, pred_high, upd_valid, upd_high;
  logic [3:0] pat, upd_pat, gchr;
  int checks = 0, failures = 0;

  cost_pattern_predictor dut (
    .clk_i(clk), .rst_ni(rst_n), .busy_o(busy), .pred_high_cost_o(pred_high),
    .pred_pattern_o(pat), .upd_valid_i(upd_valid), .upd_pattern_i(upd_pat),
    .upd_high_cost_i(upd_high), .gchr_o(gchr));

  logic [3:0] m_gchr;
  int         m_ctr [16];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_update(input logic [3:0] p, input logic h);
    upd_valid = 1; upd_pat = p; upd_high = h;
    @(posedge clk); #1;
    upd_valid = 0;
    if (h) m_ctr[p] = (m_ctr[p] == 3) ? 3 : m_ctr[p] + 1;
    else   m_ctr[p] = 0;
    m_gchr = {h, m_gchr[3:1]};
  endtask

  initial begin
    int cyc;
    upd_valid = 0; upd_pat = 0; upd_high = 0;
    for (int i = 0; i < 16; i++) m_ctr[i] = 0;
    m_gchr = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cyc = 0;
    while (busy) begin @(posedge clk); #1 cyc++; end
    check(cyc == 16, $sformatf("init took %0d cycles, expected 16", cyc));
    // worked example: reach 0100 (shift in 0,0,1,0 -> msb first 0100)
    do_update(4'd0, 1'b0); do_update(4'd0, 1'b0); do_update(4'd0, 1'b1); do_update(4'd0, 1'b0);
    check(gchr == 4'b0100, $sformatf("gchr %b expected 0100", gchr));
    check(pat == 4'd4, "pattern 0100 selects entry 4");
    do_update(pat, 1'b1);
    check(gchr == 4'b1010 && pat == 4'd10, $sformatf("after high cost %b expected 1010", gchr));
    do_update(pat, 1'b0);
    check(gchr == 4'b0101 && pat == 4'd5, $sformatf("after low cost %b expected 0101", gchr));
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      check(pat == m_gchr, "pattern matches model");
      check(pred_high == (m_ctr[m_gchr] >= 2), $sformatf("prediction at pattern %0d ctr %0d", m_gchr, m_ctr[m_gchr]));
      if ($urandom_range(0, 3) != 0) begin
        // bias towards the current pattern so counters saturate
        do_update(($urandom_range(0, 1) != 0) ? pat : 4'($urandom), 1'($urandom_range(0, 99) < 60));
      end else begin
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
