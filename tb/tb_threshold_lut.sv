// tb_threshold_lut: checks the M/D/1 thresholds against the queueing model.
// For every configuration the expected threshold is derived here directly
// from the model equations (utilisation, jobs in system, Little's law) by
// searching the largest job count W whose arrival rate W/T_obs still gives
// a response time within the bound. The default table is also compared with
// the hand-computed values {12,13,15,17,20,25}; a second instance with
// K=4 and a slow configuration checks the zero threshold of a configuration
// that can never meet the bound.
module tb_threshold_lut;
  import dtq_pkg::*;
  localparam int unsigned QD = 256;
  localparam int unsigned CW = $clog2(QD + 1);
  localparam kval_t TAU2 = '{200, 60, 30, 12, 0, 0, 0, 0};

  cfg_t cfg;
  logic [CW-1:0] w_hi, w_lo, w_hi2, w_lo2;
  int checks = 0, failures = 0;
  int exp_def [6] = '{12, 13, 15, 17, 20, 25};

  threshold_lut dut (.cfg, .w_hi, .w_lo);
  threshold_lut #(.K(4), .R_CYCLES(150), .OBS_CYCLES(128), .QDEPTH(QD), .TAU(TAU2))
    dut2 (.cfg, .w_hi(w_hi2), .w_lo(w_lo2));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // M/D/1 response time for service time tau and arrival rate lambda (Eq. 1-3)
  function automatic real resp(real tau, real lambda);
    real rho, n;
    rho = lambda * tau;
    if (rho >= 1.0) return 1.0e30;
    n = rho + rho * rho / (2.0 * (1.0 - rho));
    return n / lambda;
  endfunction

  // largest W with resp(tau, W/obs) <= r (0 if none)
  function automatic int model_w(real tau, real r, real obs);
    int w = 0;
    while (resp(tau, real'(w + 1) / obs) <= r) w++;
    return w;
  endfunction

  initial begin
    int ew [8];
    int ew2 [8];
    for (int k = 0; k < 6; k++) ew[k]  = model_w(real'(ave8_latency(k)), 150.0, 128.0);
    for (int k = 0; k < 4; k++) ew2[k] = model_w(real'(TAU2[k]), 150.0, 128.0);
    for (int k = 0; k < 6; k++) begin
      cfg = cfg_t'(k);
      #1;
      check(ew[k] == exp_def[k], $sformatf("model W%0d=%0d vs hand value %0d", k, ew[k], exp_def[k]));
      check(int'(w_hi) == ew[k], $sformatf("cfg %0d: w_hi=%0d expected %0d", k, w_hi, ew[k]));
      check(int'(w_lo) == ((k == 0) ? 0 : ew[k-1]), $sformatf("cfg %0d: w_lo=%0d", k, w_lo));
      if (k < 4) begin
        check(int'(w_hi2) == ew2[k], $sformatf("K=4 cfg %0d: w_hi=%0d expected %0d", k, w_hi2, ew2[k]));
        check(int'(w_lo2) == ((k == 0) ? 0 : ew2[k-1]), $sformatf("K=4 cfg %0d: w_lo=%0d", k, w_lo2));
      end
    end
    check(ew2[0] == 0, "slow configuration must have W=0");
    // thresholds grow with speed
    for (int k = 1; k < 6; k++) check(ew[k] > ew[k-1], "thresholds not increasing");
    $display("W = %0d %0d %0d %0d %0d %0d", ew[0], ew[1], ew[2], ew[3], ew[4], ew[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
