// Self-checking testbench for cost_analysis_table (2048 entries, PC tag and
// 2-bit up/down counter tracking high cost). A reference model with tag and
// counter per entry is trained with random mis-predicted branches; hit and
// prediction are compared at every decode. Branches that alias on the index
// but differ in the upper PC bits exercise re-allocation.
module tb_cost_analysis_table;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic busy, hit, high, uv, uh;
  logic [31:0] pc, upc;
  int checks = 0, failures = 0;
  int m_ctr [2048];
  bit m_val [2048];
  logic [18:0] m_tag [2048];
  int n_realloc = 0, n_hit_high = 0;

  cost_analysis_table dut (.clk_i(clk), .rst_ni(rst_n), .busy_o(busy), .pred_pc_i(pc), .pred_hit_o(hit),
    .pred_high_cost_o(high), .upd_valid_i(uv), .upd_pc_i(upc), .upd_high_cost_i(uh));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] rand_pc();
    // 16 index values x 2 tags -> frequent hits and some aliasing
    return {12'h000, 6'd0, 1'($urandom), 2'b00, 7'd0, 4'($urandom), 2'b00} ;
  endfunction

  initial begin
    uv = 0; uh = 0; pc = 0; upc = 0;
    for (int i = 0; i < 2048; i++) begin m_ctr[i] = 0; m_val[i] = 0; m_tag[i] = 0; end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    while (busy) @(posedge clk);
    #1;
    for (int n = 0; n < 6000; n++) begin
      int i;
      bit mh;
      pc = rand_pc();
      i = int'(pc[12:2]);
      #1;
      mh = m_val[i] && m_tag[i] == pc[31:13];
      check(hit == mh, "hit matches model");
      check(high == (mh && m_ctr[i] >= 2), "prediction matches model");
      if (mh && m_ctr[i] >= 2) n_hit_high++;
      upc = rand_pc(); uh = upc[20] ? 1'($urandom_range(0, 9) != 0) : 1'($urandom_range(0, 9) == 0);
      uv = 1;
      @(posedge clk); #1 uv = 0;
      i = int'(upc[12:2]);
      if (!(m_val[i] && m_tag[i] == upc[31:13])) begin
        if (m_val[i]) n_realloc++;
        m_val[i] = 1; m_tag[i] = upc[31:13]; m_ctr[i] = 0;
      end
      m_ctr[i] = uh ? ((m_ctr[i] == 3) ? 3 : m_ctr[i] + 1) : ((m_ctr[i] == 0) ? 0 : m_ctr[i] - 1);
    end
    check(n_realloc > 0 && n_hit_high > 0, "re-allocation and high-cost hits happened");
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
