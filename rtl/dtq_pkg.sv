// dtq_pkg: shared types, constants and elaboration-time functions of the
// dynamically-tunable dataflow accelerator.
//
// A tunable accelerator offers K configurations, numbered 0 (slowest, exact)
// to K-1 (fastest, most approximate). The controller keeps the accelerator in
// the slowest configuration that can still meet a response-time bound R,
// judged by how many jobs wait in the input queue. The per-configuration
// queue thresholds W_k come from an M/D/1 queueing model (Poisson arrivals,
// deterministic service, one server), evaluated here at elaboration time in
// integer arithmetic, so the thresholds are constants of the netlist.
//
// M/D/1 with service time tau (cycles) and arrival rate lambda (jobs/cycle):
//   rho = lambda*tau,  N = rho + rho^2 / (2(1-rho)),  R = N / lambda
// Solving R(lambda) = R_bound for lambda gives
//   lambda_max = 2(R_bound - tau) / (tau * (2 R_bound - tau))
// and the threshold is W = lambda_max * T_obs, T_obs being the observation
// period. A configuration with tau >= R_bound can never meet the bound and
// gets W = 0. The thresholds are rounded down.
//
// The AVE8 moving-average accelerator of this design averages the last
// 8-k samples in configuration k, one sample per cycle, so its service time
// is (8-k) + 2 cycles. Those numbers are this design's own choice.
package dtq_pkg;

  // Configuration index: up to 8 configurations.
  localparam int unsigned CFG_W = 3;
  localparam int unsigned K_MAX = 1 << CFG_W;
  typedef logic [CFG_W-1:0] cfg_t;

  // Per-configuration table of unsigned integers (service times, thresholds).
  typedef int unsigned kval_t [K_MAX];

  // Symptom produced by comparing the queue occupancy with the thresholds.
  typedef enum logic [1:0] {
    SYM_STAY      = 2'd0,
    SYM_SPEED_UP  = 2'd1,
    SYM_SLOW_DOWN = 2'd2
  } symptom_e;

  // M/D/1 threshold W = floor(obs * 2(r - tau) / (tau (2r - tau))).
  function automatic int unsigned md1_threshold(int unsigned tau, int unsigned r,
                                                int unsigned obs);
    int unsigned     slack, span;
    longint unsigned num, den;
    if (tau == 0 || tau >= r) return 0;
    slack = r - tau;
    span  = 2 * r - tau;
    num   = longint'(obs) * 2 * longint'(slack);
    den   = longint'(tau) * longint'(span);
    return int'(num / den);
  endfunction

  // Thresholds for all configurations; entries at or above k_num are 0.
  function automatic kval_t md1_thresholds(kval_t tau, int unsigned k_num,
                                           int unsigned r, int unsigned obs);
    kval_t w;
    for (int unsigned k = 0; k < K_MAX; k++)
      w[k] = (k < k_num) ? md1_threshold(tau[k], r, obs) : 0;
    return w;
  endfunction

  // ---------------------------------------------------------------- AVE8
  localparam int unsigned AVE_MAX_WIN = 8;

  // Averaging window of configuration k (never below one sample).
  function automatic int unsigned ave8_window(int unsigned k);
    return (k < AVE_MAX_WIN) ? AVE_MAX_WIN - k : 1;
  endfunction

  // Cycles from taking a sample to handing its result over, with the
  // consumer ready: one load cycle, one cycle per window sample, one
  // output cycle.
  function automatic int unsigned ave8_latency(int unsigned k);
    return ave8_window(k) + 2;
  endfunction

  function automatic kval_t ave8_latencies();
    kval_t t;
    for (int unsigned k = 0; k < K_MAX; k++) t[k] = ave8_latency(k);
    return t;
  endfunction

  // Reciprocal ceil(2^shift / w). With shift = DATA_W + 6 the product
  // sum * recip >> shift equals floor(sum / w) exactly for every sum of up
  // to 8 samples of DATA_W bits (the rounding error stays below 1/w).
  function automatic longint unsigned ave8_recip(int unsigned w, int unsigned shift);
    return ((longint'(1) << shift) + longint'(w) - 1) / longint'(w);
  endfunction

endpackage
