// Self-checking testbench for jrs_conf_estimator (1024 x 2-bit up/reset
// miss-distance counters, index PC[11:2] xor folded 13-bit history, high
// confidence at 3). The index is recomputed independently; a reference
// table checks confidence over random traffic, and a directed part checks
// that three correct predictions give high confidence and a mis-prediction
// removes it.
module tb_jrs_conf_estimator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic busy, hc, upd_valid, upd_ok;
  logic [31:0] pc;
  logic [12:0] ghr;
  logic [9:0] idx, upd_idx;
  int checks = 0, failures = 0;
  int m_ctr [1024];

  jrs_conf_estimator dut (.clk_i(clk), .rst_ni(rst_n), .busy_o(busy), .pred_pc_i(pc), .ghr_i(ghr),
    .pred_high_conf_o(hc), .pred_idx_o(idx), .upd_valid_i(upd_valid), .upd_idx_i(upd_idx), .upd_correct_i(upd_ok));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [9:0] ref_idx(logic [31:0] p, logic [12:0] g);
    return p[11:2] ^ g[9:0] ^ {7'd0, g[12:10]};
  endfunction

  task automatic upd(input logic [9:0] i, input logic ok);
    upd_valid = 1; upd_idx = i; upd_ok = ok;
    @(posedge clk); #1 upd_valid = 0;
    m_ctr[i] = ok ? ((m_ctr[i] == 3) ? 3 : m_ctr[i] + 1) : 0;
  endtask

  initial begin
    int cyc;
    upd_valid = 0; upd_idx = 0; upd_ok = 0; pc = 0; ghr = 0;
    for (int i = 0; i < 1024; i++) m_ctr[i] = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    cyc = 0;
    while (busy) begin @(posedge clk); #1 cyc++; end
    check(cyc == 1024, $sformatf("init %0d cycles", cyc));
    pc = 32'h0000_8abc; ghr = 13'h1555;
    #1 check(idx == ref_idx(pc, ghr), "index = PC xor history");
    check(!hc, "starts low confidence");
    upd(idx, 1); upd(idx, 1); check(!hc, "two correct: still low");
    upd(idx, 1); check(hc, "three correct: high");
    upd(idx, 0); check(!hc, "mis-prediction resets");
    for (int n = 0; n < 4000; n++) begin
      pc = {$urandom_range(0, 63), 2'b00}; ghr = 13'($urandom_range(0, 7));
      #1 check(idx == ref_idx(pc, ghr), "index");
      check(hc == (m_ctr[ref_idx(pc, ghr)] >= 3), "confidence matches model");
      upd(idx, $urandom_range(0, 9) != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
