// Self-checking testbench for gshare_predictor (8192 x 2-bit up/down, index
// PC[14:2] xor 13-bit global history). Checks that the history shifts the
// resolved direction in at bit 0, that the index is PC xor history, and
// compares random traffic (training through the returned index) with a
// reference model.
module tb_gshare_predictor;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic busy, taken, upd_valid, upd_taken, hist_valid, hist_taken;
  logic [31:0] pc;
  logic [12:0] idx, ghr, upd_idx;
  int checks = 0, failures = 0;
  int m_ctr [8192];
  logic [12:0] m_ghr;

  gshare_predictor dut (.clk_i(clk), .rst_ni(rst_n), .busy_o(busy), .pred_pc_i(pc), .pred_taken_o(taken),
    .pred_idx_o(idx), .ghr_o(ghr), .upd_valid_i(upd_valid), .upd_idx_i(upd_idx), .upd_taken_i(upd_taken),
    .hist_valid_i(hist_valid), .hist_taken_i(hist_taken));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    upd_valid = 0; upd_idx = 0; upd_taken = 0; hist_valid = 0; hist_taken = 0; pc = 0;
    for (int i = 0; i < 8192; i++) m_ctr[i] = 1;
    m_ghr = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    while (busy) @(posedge clk);
    #1;
    for (int n = 0; n < 5000; n++) begin
      logic t;
      logic [12:0] i0;
      pc = {$urandom_range(0, 255), 2'b00};
      #1;
      check(ghr == m_ghr, "history matches model");
      check(idx == (pc[14:2] ^ m_ghr), "index is PC xor history");
      check(taken == (m_ctr[pc[14:2] ^ m_ghr] >= 2), "prediction matches model");
      // direction is a function of PC and last outcome: learnable through history
      t = pc[2] ^ m_ghr[0];
      i0 = idx;
      upd_valid = 1; upd_idx = idx; upd_taken = t; hist_valid = 1; hist_taken = t;
      @(posedge clk); #1 upd_valid = 0; hist_valid = 0;
      m_ctr[i0] = t ? ((m_ctr[i0] == 3) ? 3 : m_ctr[i0] + 1) : ((m_ctr[i0] == 0) ? 0 : m_ctr[i0] - 1);
      m_ghr = {m_ghr[11:0], t};
    end
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
