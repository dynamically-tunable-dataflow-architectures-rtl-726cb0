// tb_planner: random symptoms and accelerator activity against a reference
// model. Checks that the decided configuration steps by one and saturates at
// 0 and K-1, and that the applied configuration follows it only while the
// accelerator is idle.
module tb_planner;
  import dtq_pkg::*;
  localparam int unsigned K = 6;
  logic clk = 0, rst_n = 0, sym_valid = 0, acc_idle = 1, changed;
  symptom_e symptom = SYM_STAY;
  cfg_t next_cfg, cfg;
  int checks = 0, failures = 0;
  int m_next = 0, m_cfg = 0;
  int n_sat_hi = 0, n_sat_lo = 0, n_deferred = 0, n_changed = 0;
  bit pending = 0;

  planner #(.K(K)) dut (.clk, .rst_n, .sym_valid, .symptom, .acc_idle, .next_cfg, .cfg, .changed);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 5000; i++) begin
      automatic bit up_phase = (i % 1000 < 500);          // mostly up, then mostly down
      automatic int r = $urandom_range(99);
      automatic int p_up = up_phase ? 60 : 10;
      automatic int p_down = up_phase ? 25 : 60;
      sym_valid <= ($urandom_range(3) == 0);
      symptom   <= (r < p_up) ? SYM_SPEED_UP : (r < p_up + p_down) ? SYM_SLOW_DOWN : SYM_STAY;
      acc_idle  <= ($urandom_range(9) < 3);
      @(negedge clk);
      check(int'(next_cfg) == m_next, $sformatf("next_cfg %0d expected %0d", next_cfg, m_next));
      check(int'(cfg) == m_cfg, $sformatf("cfg %0d expected %0d", cfg, m_cfg));
      // model the edge
      begin
        automatic int d = m_next;
        bit chg;
        if (sym_valid && symptom == SYM_SPEED_UP) begin
          if (m_next < K - 1) d = m_next + 1; else n_sat_hi++;
        end
        if (sym_valid && symptom == SYM_SLOW_DOWN) begin
          if (m_next > 0) d = m_next - 1; else n_sat_lo++;
        end
        if (!acc_idle && d != m_cfg) n_deferred++;
        chg = acc_idle && d != m_cfg;
        m_next = d;
        if (chg) m_cfg = d;
        @(posedge clk);
        #1;
        check(changed == chg, "changed pulse");
        if (chg) n_changed++;
      end
    end
    check(n_sat_hi > 0 && n_sat_lo > 0 && n_deferred > 0 && n_changed > 0, "a case never occurred");
    $display("saturated high=%0d low=%0d deferred=%0d applied=%0d", n_sat_hi, n_sat_lo, n_deferred, n_changed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
