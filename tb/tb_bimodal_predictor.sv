// Self-checking testbench for bimodal_predictor (8192 x 2-bit up/down,
// index PC[14:2], start value 01). Checks the 8192-cycle initialisation,
// the saturating counter sequence of one branch, and random traffic against
// a reference table.
module tb_bimodal_predictor;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic busy, taken, upd_valid, upd_taken;
  logic [31:0] pc, upd_pc;
  int checks = 0, failures = 0;
  int m_ctr [8192];

  bimodal_predictor dut (.clk_i(clk), .rst_ni(rst_n), .busy_o(busy), .pred_pc_i(pc), .pred_taken_o(taken),
    .upd_valid_i(upd_valid), .upd_pc_i(upd_pc), .upd_taken_i(upd_taken));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic upd(input logic [31:0] p, input logic t);
    int i;
    i = int'(p[14:2]);
    upd_valid = 1; upd_pc = p; upd_taken = t;
    @(posedge clk); #1 upd_valid = 0;
    m_ctr[i] = t ? ((m_ctr[i] == 3) ? 3 : m_ctr[i] + 1) : ((m_ctr[i] == 0) ? 0 : m_ctr[i] - 1);
  endtask

  initial begin
    int cyc;
    upd_valid = 0; upd_pc = 0; upd_taken = 0; pc = 0;
    for (int i = 0; i < 8192; i++) m_ctr[i] = 1;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    cyc = 0;
    while (busy) begin @(posedge clk); #1 cyc++; end
    check(cyc == 8192, $sformatf("init %0d cycles", cyc));
    pc = 32'h0040_0010;
    #1 check(!taken, "weakly not-taken at start");
    upd(pc, 1); check(taken, "01 -> 10 taken");
    upd(pc, 1); upd(pc, 1); upd(pc, 0); check(taken, "saturated at 11, one not-taken -> 10 still taken");
    upd(pc, 0); check(!taken, "-> 01 not taken");
    for (int n = 0; n < 4000; n++) begin
      pc = {$urandom_range(0, 1023), 2'b00};
      #1 check(taken == (m_ctr[pc[14:2]] >= 2), "prediction matches model");
      upd({$urandom_range(0, 1023), 2'b00}, 1'($urandom_range(0, 99) < 65));
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
