// tb_dyn_tunable_ave8: end-to-end test of the tunable AVE8 stage at its
// default size (256-entry queues, six configurations, 128-cycle observation,
// 150-cycle response bound).
//
// Three traffic scenarios of 1000 random samples each are run back to back:
//   highly congested  arrivals with probability 0.30 per cycle, above what
//                     even the fastest configuration serves (0.2/cycle); the
//                     consumer also stops for a while so the output FIFO fills
//   congested         probability 0.14, between the exact configuration's
//                     rate (0.1) and the fastest one's
//   uncongested       probability 0.03, plus short bursts
// Every result is compared with a reference moving average over the window
// of the configuration it is tagged with. The configuration must move by one
// step at a time and change only between iterations. The test counts the
// mechanisms of the design (speed-up, slow-down and stay decisions, the
// almost-full and empty rules, a decision held until the iteration ends,
// input-queue backpressure, output-FIFO stall, both ends of the
// configuration range) and fails if one never happens. It also checks that
// the congested traffic meets the 150-cycle bound on average and that the
// mean configuration falls from the highest traffic to the lowest. Per
// scenario it
// prints the mean response time in cycles, the error against the exact
// 8-sample average (mean absolute percentage error) and how often each
// configuration was used.
module tb_dyn_tunable_ave8;
  import dtq_pkg::*;
  localparam int unsigned DW = 16;
  localparam int NSAMP = 1000;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [DW-1:0] in_data, out_data;
  cfg_t out_cfg, cfg, next_cfg;
  logic [8:0] n_wait;

  dyn_tunable_ave8 dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready,
                        .out_data, .out_cfg, .cfg, .next_cfg, .n_wait);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  int inputs [$];
  longint t_in [$];
  int n_out = 0;

  // per-scenario statistics
  int scen = 0;
  real rsum [3], esum [3];
  int rcnt [3], ecnt [3];
  int cfg_hist [3][8];

  // mechanism counters
  int m_up = 0, m_down = 0, m_stay = 0, m_af = 0, m_empty_down = 0, m_held = 0;
  int m_in_full = 0, m_out_full = 0, m_max = 0, m_back0 = 0;
  bit left0 = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic int ref_avg(int j, int w);
    longint s = 0;
    for (int i = 0; i < w; i++) if (j - i >= 0) s += inputs[j - i];
    return int'(s / w);
  endfunction

  // ----------------------------------------------------------- monitors
  cfg_t prev_cfg = '0;
  bit   prev_idle = 1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (cfg != prev_cfg) begin
        check(prev_idle, "configuration changed during an iteration");
        check(int'(cfg) == int'(prev_cfg) + 1 || int'(cfg) + 1 == int'(prev_cfg),
              "configuration moved by more than one step");
      end
      if (dut.u_ctrl.sym_valid) begin
        case (dut.u_ctrl.symptom)
          SYM_SPEED_UP:  m_up++;
          SYM_SLOW_DOWN: m_down++;
          default:       m_stay++;
        endcase
        if (dut.snap_af) m_af++;
        if (dut.snap_empty && dut.u_ctrl.symptom == SYM_SLOW_DOWN) m_empty_down++;
      end
      if (next_cfg != cfg && !dut.acc_idle) m_held++;
      if (in_valid && !in_ready) m_in_full++;
      if (dut.r_valid && !dut.r_ready) m_out_full++;
      if (cfg == 3'd5) m_max++;
      if (cfg != 0) left0 = 1;
      if (cfg == 0 && left0) begin m_back0++; left0 = 0; end
    end
    prev_cfg  <= cfg;
    prev_idle <= dut.acc_idle;
  end

  // ------------------------------------------------------------ consumer
  bit consumer_stop = 0;
  always @(negedge clk) begin
    out_ready = !consumer_stop && ($urandom_range(9) != 0);
    if (rst_n && out_valid && out_ready) begin
      int w, expv;
      w = int'(ave8_window(32'(out_cfg)));
      check(n_out < inputs.size(), "result without a sample");
      if (n_out < inputs.size()) begin
        expv = ref_avg(n_out, w);
        check(int'(out_data) == expv,
              $sformatf("result %0d (cfg %0d): %0d expected %0d", n_out, out_cfg, out_data, expv));
        rsum[scen] += real'(cyc - t_in[n_out]);
        rcnt[scen]++;
        begin
          automatic int gold = ref_avg(n_out, 8);
          if (gold != 0) begin
            esum[scen] += ((gold > int'(out_data)) ? real'(gold - int'(out_data)) : real'(int'(out_data) - gold)) / real'(gold);
            ecnt[scen]++;
          end
        end
        cfg_hist[scen][out_cfg]++;
      end
      n_out++;
    end
  end

  // ------------------------------------------------------------ producer
  task automatic run_scenario(int s, int p_permille, int burst_permille);
    int sent = 0;
    int burst = 0;
    scen = s;
    while (sent < NSAMP) begin
      @(negedge clk);
      if (!in_valid) begin
        if (burst > 0) begin burst--; in_valid = 1; end
        else if ($urandom_range(999) < p_permille) in_valid = 1;
        else if ($urandom_range(999) < burst_permille) burst = 20;
        if (in_valid) begin
          in_data = DW'($urandom_range(65535, 1));
          t_in.push_back(cyc);
        end
      end
      if (in_valid && in_ready) begin
        @(posedge clk);
        inputs.push_back(int'(in_data));
        sent++;
        #1 in_valid = 0;
      end
    end
    // let the stage drain before the next scenario
    while (n_out < inputs.size()) @(negedge clk);
    repeat (500) @(negedge clk);
  endtask

  initial begin
    in_valid = 0; in_data = '0; out_ready = 0;
    for (int s = 0; s < 3; s++) begin
      rsum[s] = 0.0; esum[s] = 0.0; rcnt[s] = 0; ecnt[s] = 0;
      for (int k = 0; k < 8; k++) cfg_hist[s][k] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    fork
      begin
        consumer_stop = 1;
        repeat (2500) @(negedge clk);
        consumer_stop = 0;
      end
      run_scenario(0, 300, 0);
    join
    run_scenario(1, 140, 0);
    run_scenario(2, 30, 2);
    check(n_out == 3 * NSAMP, $sformatf("%0d results for %0d samples", n_out, 3 * NSAMP));
    for (int s = 0; s < 3; s++)
      $display("%s: mean response %0.1f cycles, MAPE %0.4f, configurations 0..5: %0d %0d %0d %0d %0d %0d",
               (s == 0) ? "highly congested" : (s == 1) ? "congested" : "uncongested",
               rsum[s] / real'(rcnt[s]), esum[s] / real'(ecnt[s]),
               cfg_hist[s][0], cfg_hist[s][1], cfg_hist[s][2], cfg_hist[s][3], cfg_hist[s][4], cfg_hist[s][5]);
    $display("speed-up=%0d slow-down=%0d stay=%0d almost-full=%0d empty-slow-down=%0d held=%0d",
             m_up, m_down, m_stay, m_af, m_empty_down, m_held);
    $display("input-full=%0d output-full=%0d cycles-at-fastest=%0d returns-to-exact=%0d",
             m_in_full, m_out_full, m_max, m_back0);
    check(m_up > 0,         "no speed-up decision");
    check(m_down > 0,       "no slow-down decision");
    check(m_stay > 0,       "no stay decision");
    check(m_af > 0,         "queue never almost full at an observation");
    check(m_empty_down > 0, "empty queue never caused a slow-down");
    check(m_held > 0,       "no decision was held until an iteration ended");
    check(m_in_full > 0,    "input queue never pushed back");
    check(m_out_full > 0,   "output FIFO never stalled the accelerator");
    check(m_max > 0,        "fastest configuration never used");
    check(m_back0 > 0,      "never returned to the exact configuration");
    // under congestion the controller keeps the mean response time within the bound
    check(rsum[1] / real'(rcnt[1]) <= 150.0, "congested: mean response time above the bound");
    // the lighter the traffic, the more accurate the configurations used
    begin
      real mcfg [3];
      for (int s = 0; s < 3; s++) begin
        mcfg[s] = 0.0;
        for (int k = 0; k < 8; k++) mcfg[s] += real'(k * cfg_hist[s][k]);
        mcfg[s] /= real'(NSAMP);
      end
      $display("mean configuration: %0.2f %0.2f %0.2f", mcfg[0], mcfg[1], mcfg[2]);
      check(mcfg[0] > mcfg[1] && mcfg[1] > mcfg[2], "configuration does not follow the traffic level");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
