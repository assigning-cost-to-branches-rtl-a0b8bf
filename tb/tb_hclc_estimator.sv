// Self-checking testbench for hclc_estimator (16 x 1-bit, PC[5:2] index).
// Checks that only high-cost resolutions train the table, that a
// low-confidence high-cost resolution sets the entry and a high-confidence
// one clears it, and that only low-confidence branches are reported as LCHC;
// then compares random traffic with a reference table.
module tb_hclc_estimator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic busy, lchc, low_conf, upd_valid, upd_high, upd_lc;
  logic [31:0] pred_pc, upd_pc;
  int checks = 0, failures = 0;
  bit m_tab [16];

  hclc_estimator dut (.clk_i(clk), .rst_ni(rst_n), .busy_o(busy), .pred_pc_i(pred_pc),
    .pred_low_conf_i(low_conf), .pred_lchc_o(lchc), .upd_valid_i(upd_valid), .upd_pc_i(upd_pc),
    .upd_high_cost_i(upd_high), .upd_low_conf_i(upd_lc));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic upd(input logic [31:0] pc, input logic h, input logic lc);
    upd_valid = 1; upd_pc = pc; upd_high = h; upd_lc = lc;
    @(posedge clk); #1 upd_valid = 0;
    if (h) m_tab[pc[5:2]] = lc;
  endtask

  initial begin
    upd_valid = 0; upd_pc = 0; upd_high = 0; upd_lc = 0; pred_pc = 0; low_conf = 0;
    for (int i = 0; i < 16; i++) m_tab[i] = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    while (busy) @(posedge clk);
    #1 pred_pc = 32'h40; low_conf = 1;
    #1 check(!lchc, "empty table: not LCHC");
    upd(32'h40, 0, 1); check(!lchc, "low-cost resolution does not train");
    upd(32'h40, 1, 1); check(lchc, "high-cost low-confidence sets entry");
    low_conf = 0; #1 check(!lchc, "high-confidence branch never LCHC");
    low_conf = 1;
    upd(32'h40, 1, 0); check(!lchc, "high-cost high-confidence clears entry");
    for (int n = 0; n < 3000; n++) begin
      pred_pc = $urandom; low_conf = 1'($urandom);
      #1 check(lchc == (low_conf && m_tab[pred_pc[5:2]]), "LCHC matches model");
      upd($urandom, 1'($urandom), 1'($urandom));
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
