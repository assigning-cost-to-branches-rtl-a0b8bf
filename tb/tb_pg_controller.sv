// Self-checking testbench for pg_controller (8-bit counter, 128-entry ROB).
// A reference counter follows random increments and decrements; every cycle
// the gate must equal "counter > threshold". Static thresholds 0..3 are
// swept, the occupancy-based threshold is checked at the range edges
// (31/32, 63/64, 95/96), and the gating-event and gated-cycle counters are
// compared with counts made by the testbench.
module tb_pg_controller;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic inc, dyn, gate;
  logic [7:0] dec_n, cnt, rob;
  logic [2:0] thr, thr_o;
  logic [31:0] ev, gc;
  int checks = 0, failures = 0;
  int m_cnt = 0, m_ev = 0, m_gc = 0;
  bit m_prev = 0;

  pg_controller dut (.clk_i(clk), .rst_ni(rst_n), .inc_i(inc), .dec_n_i(dec_n), .thr_i(thr), .dyn_en_i(dyn),
    .rob_count_i(rob), .gate_o(gate), .thr_o(thr_o), .cnt_o(cnt), .gate_events_o(ev), .gated_cycles_o(gc));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int dyn_thr(int occ);
    if (occ <= 31) return 3;
    if (occ <= 63) return 2;
    if (occ <= 95) return 1;
    return 0;
  endfunction

  initial begin
    int t;
    inc = 0; dec_n = 0; thr = 3'd1; dyn = 0; rob = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // occupancy thresholds at the edges
    dyn = 1;
    for (int occ = 0; occ <= 128; occ++) begin
      rob = 8'(occ); #1;
      check(int'(thr_o) == dyn_thr(occ), $sformatf("dynamic threshold at occupancy %0d", occ));
    end
    for (int n = 0; n < 6000; n++) begin
      dyn = (n / 1000) % 2 == 1;
      thr = 3'((n / 250) % 4);
      rob = 8'($urandom_range(0, 128));
      inc = $urandom_range(0, 2) != 0;
      t = m_cnt + int'(inc);
      dec_n = (t > 0 && $urandom_range(0, 2) == 0) ? 8'($urandom_range(1, (t > 3) ? 3 : t)) : 8'd0;
      #1;
      t = dyn ? dyn_thr(int'(rob)) : int'(thr);
      check(int'(thr_o) == t, "threshold in use");
      check(int'(cnt) == m_cnt, "counter matches model");
      check(gate == (m_cnt > t), "gate = counter > threshold");
      if (gate && !m_prev) m_ev++;
      if (gate) m_gc++;
      m_prev = gate;
      @(posedge clk); #1;
      m_cnt = m_cnt + int'(inc) - int'(dec_n);
    end
    inc = 0; dec_n = 0; #1;
    check(ev == 32'(m_ev) && gc == 32'(m_gc), $sformatf("events %0d/%0d cycles %0d/%0d", ev, m_ev, gc, m_gc));
    check(m_ev > 10, "gating started many times");
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
