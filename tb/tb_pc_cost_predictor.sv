// Self-checking testbench for pc_cost_predictor (16 x 2-bit up/reset
// counters indexed by PC[5:2], tracking high cost). A reference table is
// trained with the same random resolved branches and every decode-time
// prediction is compared with it; a directed part checks that two high-cost
// resolutions make a branch high-cost and one low-cost resolution resets it.
module tb_pc_cost_predictor;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic busy, pred_high, upd_valid, upd_high;
  logic [31:0] pred_pc, upd_pc;
  int checks = 0, failures = 0;
  int m_ctr [16];

  pc_cost_predictor dut (.clk_i(clk), .rst_ni(rst_n), .busy_o(busy), .pred_pc_i(pred_pc),
    .pred_high_cost_o(pred_high), .upd_valid_i(upd_valid), .upd_pc_i(upd_pc), .upd_high_cost_i(upd_high));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic upd(input logic [31:0] pc, input logic h);
    int i;
    i = int'(pc[5:2]);
    upd_valid = 1; upd_pc = pc; upd_high = h;
    @(posedge clk); #1 upd_valid = 0;
    m_ctr[i] = h ? ((m_ctr[i] == 3) ? 3 : m_ctr[i] + 1) : 0;
  endtask

  initial begin
    upd_valid = 0; upd_pc = 0; upd_high = 0; pred_pc = 0;
    for (int i = 0; i < 16; i++) m_ctr[i] = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    while (busy) @(posedge clk);
    #1;
    pred_pc = 32'h0000_1234;
    check(!pred_high, "starts low cost");
    upd(32'h0000_1234, 1); check(!pred_high, "one high-cost resolution: counter 1, still low");
    upd(32'h0000_1234, 1); check(pred_high, "two high-cost resolutions: high");
    upd(32'h0000_1234, 0); check(!pred_high, "low-cost resolution resets");
    for (int n = 0; n < 3000; n++) begin
      pred_pc = $urandom;
      #1 check(pred_high == (m_ctr[pred_pc[5:2]] >= 2), "prediction matches model");
      upd({$urandom_range(0, 255), 2'b00}, 1'($urandom_range(0, 99) < 70));
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
