// Self-checking testbench for cost_combined_predictor (8192-entry bimodal,
// gshare and chooser, cost gating on). A reference model of the three tables
// and the global history checks every prediction: high-cost branches take
// the chooser's pick of bimodal (0/1) or gshare (2/3), low-cost branches take
// gshare alone, and bimodal and chooser are trained only for high-cost
// branches. It also checks that the access counters count each path.
module tb_cost_combined_predictor;
  import spec_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic busy, pv, hc, uv, ut;
  logic [31:0] pc, upc;
  bp_pred_t pr, ui;
  logic [12:0] ghr;
  logic [31:0] gs_cnt, cb_cnt;
  int checks = 0, failures = 0;
  int m_bi [8192], m_gs [8192], m_ch [8192];
  logic [12:0] m_ghr;
  int n_gs = 0, n_cb = 0, n_p1 = 0;

  cost_combined_predictor dut (.clk_i(clk), .rst_ni(rst_n), .busy_o(busy), .pred_valid_i(pv), .pred_pc_i(pc),
    .pred_high_cost_i(hc), .pred_o(pr), .ghr_o(ghr), .upd_valid_i(uv), .upd_pc_i(upc), .upd_i(ui),
    .upd_taken_i(ut), .gshare_only_cnt_o(gs_cnt), .combined_cnt_o(cb_cnt));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic int sat(int v, bit up);
    return up ? ((v == 3) ? 3 : v + 1) : ((v == 0) ? 0 : v - 1);
  endfunction

  initial begin
    pv = 0; hc = 0; uv = 0; ut = 0; pc = 0; upc = 0; ui = '0;
    for (int i = 0; i < 8192; i++) begin m_bi[i] = 1; m_gs[i] = 1; m_ch[i] = 1; end
    m_ghr = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    while (busy) @(posedge clk);
    #1;
    for (int n = 0; n < 6000; n++) begin
      int bi, gi;
      logic p1, p2, exp_t, t;
      pc = {$urandom_range(0, 127), 2'b00};
      hc = pc[3] | 1'($urandom_range(0, 3) == 0);
      pv = 1;
      bi = int'(pc[14:2]); gi = int'(pc[14:2] ^ m_ghr);
      p1 = m_bi[bi] >= 2; p2 = m_gs[gi] >= 2;
      exp_t = (hc && m_ch[bi] < 2) ? p1 : p2;
      if (hc && m_ch[bi] < 2) n_p1++;
      #1;
      check(pr.p1 == p1 && pr.p2 == p2, "component predictions match model");
      check(pr.combined == hc, "path follows cost class");
      check(pr.taken == exp_t, "final direction matches model");
      // outcome: biased per branch, so bimodal is often right
      t = pc[4] ? 1'($urandom_range(0, 9) != 0) : (pc[2] ^ m_ghr[0]);
      ui = pr; upc = pc; ut = t; uv = 1;
      @(posedge clk); #1 uv = 0; pv = 0;
      if (hc) n_cb++; else n_gs++;
      m_gs[gi] = sat(m_gs[gi], t);
      if (hc) begin
        m_bi[bi] = sat(m_bi[bi], t);
        if (p1 != p2) m_ch[bi] = sat(m_ch[bi], p2 == t);
      end
      m_ghr = {m_ghr[11:0], t};
    end
    check(gs_cnt == 32'(n_gs) && cb_cnt == 32'(n_cb), $sformatf("access counters %0d/%0d vs %0d/%0d", gs_cnt, cb_cnt, n_gs, n_cb));
    check(n_p1 > 0, "bimodal chosen at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
