// tb_ave8_preset_compare: adaptive control against fixed configurations.
//
// Seven copies of the tunable AVE8 stage, at default parameters, receive the
// same offered traffic: copy 0 runs under its controller, copies 1..6 have
// their configuration held at 0..5 (the applied-configuration register is
// forced). Samples that a full input queue refuses wait in the testbench, so
// the response time (result time minus offer time) includes that wait. For
// the highly congested, congested and uncongested traffic of the end-to-end
// test the testbench reports, per copy, the mean response time and the mean
// absolute percentage error against the exact 8-sample average, checks every
// result against the reference average of its window, and checks that
//   - the adaptive copy has a smaller error than the fastest configuration,
//   - under congested traffic the adaptive copy meets the 150-cycle bound
//     while the exact configuration does not, and with a smaller error than
//     any fixed configuration that meets the bound,
//   - under uncongested traffic the adaptive copy stays close to exact
//     (smaller error than configuration 2).
module tb_ave8_preset_compare;
  import dtq_pkg::*;
  localparam int DW = 16, NSAMP = 1000, NCOPY = 7;

  logic clk = 0, rst_n = 0;
  longint cyc = 0;
  bit arrive;
  int arr_data;
  int checks = 0, failures = 0;
  int gold [$];                       // exact 8-sample averages of the stream

  real rsum [NCOPY], esum [NCOPY];
  int  nres [NCOPY];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endfunction

  for (genvar g = 0; g < NCOPY; g++) begin : g_copy
    logic in_valid, in_ready, out_valid, out_ready;
    logic [DW-1:0] in_data, out_data;
    cfg_t out_cfg, cfg, next_cfg;
    logic [8:0] n_wait;
    int pend_d [$];
    longint pend_t [$];
    int hist [$];
    longint t_acc [$];
    bit will_accept;

    dyn_tunable_ave8 dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready,
                          .out_data, .out_cfg, .cfg, .next_cfg, .n_wait);

    if (g > 0) begin : g_preset
      initial force dut.u_ctrl.u_plan.cfg = cfg_t'(g - 1);
    end

    always @(negedge clk) begin
      if (!rst_n) begin
        pend_d.delete(); pend_t.delete(); hist.delete(); t_acc.delete();
        will_accept = 0;
        in_valid = 0; in_data = '0; out_ready = 1;
      end else begin
        // the edge just passed took the offered sample
        if (will_accept) begin
          hist.push_back(pend_d.pop_front());
          t_acc.push_back(pend_t.pop_front());
        end
        // result handed over at the coming edge
        if (out_valid) begin
          automatic int j = nres[g];
          automatic int w = int'(ave8_window(32'(out_cfg)));
          automatic longint s = 0;
          for (int i = 0; i < w; i++) if (j - i >= 0) s += hist[j - i];
          check(int'(out_data) == int'(s / w), $sformatf("copy %0d result %0d", g, j));
          if (g > 0) check(int'(out_cfg) == g - 1, "preset configuration not held");
          rsum[g] += real'(cyc - t_acc[j]);
          if (gold[j] != 0)
            esum[g] += ((gold[j] > int'(out_data)) ? real'(gold[j] - int'(out_data))
                                                   : real'(int'(out_data) - gold[j])) / real'(gold[j]);
          nres[g]++;
        end
        if (arrive) begin pend_d.push_back(arr_data); pend_t.push_back(cyc); end
        in_valid = (pend_d.size() > 0);
        in_data  = in_valid ? DW'(pend_d[0]) : '0;
        will_accept = in_valid && in_ready;
      end
    end
  end

  function automatic bit all_done();
    for (int g = 0; g < NCOPY; g++) if (nres[g] < NSAMP) return 0;
    return 1;
  endfunction

  task automatic run_scenario(string name, int p_permille, int burst_permille,
                              output real r_ada, output real r_exact,
                              output real e_ada, output real e [6], output real r [6]);
    int sent = 0, burst = 0;
    int stream [$];
    arrive = 0;
    rst_n = 0;
    gold.delete();
    for (int g = 0; g < NCOPY; g++) begin rsum[g] = 0; esum[g] = 0; nres[g] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (sent < NSAMP) begin
      @(posedge clk);
      #1;
      arrive = 0;
      if (burst > 0) begin burst--; arrive = 1; end
      else if ($urandom_range(999) < p_permille) arrive = 1;
      else if ($urandom_range(999) < burst_permille) burst = 20;
      if (arrive) begin
        automatic longint s = 0;
        arr_data = $urandom_range(65535, 1);
        stream.push_back(arr_data);
        for (int i = 0; i < 8; i++) if (sent - i >= 0) s += stream[sent - i];
        gold.push_back(int'(s / 8));
        sent++;
      end
    end
    @(posedge clk) #1 arrive = 0;
    while (!all_done()) @(negedge clk);
    $display("%s (mean response cycles / MAPE):", name);
    $display("  adaptive  %8.1f  %0.4f", rsum[0] / NSAMP, esum[0] / NSAMP);
    for (int k = 0; k < 6; k++)
      $display("  conf%0d     %8.1f  %0.4f", k, rsum[k+1] / NSAMP, esum[k+1] / NSAMP);
    r_ada = rsum[0] / NSAMP; r_exact = rsum[1] / NSAMP; e_ada = esum[0] / NSAMP;
    for (int k = 0; k < 6; k++) begin e[k] = esum[k+1] / NSAMP; r[k] = rsum[k+1] / NSAMP; end
  endtask

  initial begin
    real ra, rx, ea;
    real e [6], r [6];
    real best;
    arrive = 0;
    run_scenario("highly congested", 300, 0, ra, rx, ea, e, r);
    check(ea < e[5], "highly congested: adaptive error not below the fastest configuration");
    run_scenario("congested", 140, 0, ra, rx, ea, e, r);
    check(ea < e[5], "congested: adaptive error not below the fastest configuration");
    check(ra <= 150.0, "congested: adaptive copy misses the response bound");
    check(rx > 150.0, "congested: exact configuration unexpectedly meets the bound");
    // smallest error among the fixed configurations that meet the bound
    best = 1.0e9;
    for (int k = 0; k < 6; k++) if (r[k] <= 150.0 && e[k] < best) best = e[k];
    check(ea < best, "congested: adaptive error not below the best fixed configuration meeting the bound");
    run_scenario("uncongested", 30, 2, ra, rx, ea, e, r);
    check(ea < e[5], "uncongested: adaptive error not below the fastest configuration");
    check(ea < e[2], "uncongested: adaptive copy not close to exact");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
