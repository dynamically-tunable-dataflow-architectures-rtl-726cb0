// md1_controller: online controller of a dynamically-tunable accelerator.
//
// Every OBS_CYCLES cycles the observation timer asks the smart waiting queue
// for a snapshot (`sample`). One cycle later the snapshot arrives
// (snap_valid with N_wait and the almost-full / empty flags). The threshold
// LUT, addressed by the decided configuration, returns W_k and W_(k-1); the
// symptom detector compares them with N_wait; the planner steps the decided
// configuration and applies it to the accelerator at the next iteration
// boundary (acc_idle). A decision is thus made two cycles after each tick and
// reaches `cfg` as soon as the accelerator is idle.
//
// An accelerator with several inputs has one smart waiting queue per input
// (NUM_Q of them, all sampled by the same strobe). The controller then judges
// the most loaded queue: N_wait is the largest of the sampled counts,
// almost-full holds if any queue was almost full, and empty only if every
// queue was empty.
//
// The structure (queue counter, LUT of W_k, comparison giving a symptom,
// planner driving the configuration) and the reaction to any almost-full
// input queue follow the described design; the snapshot handshake, the
// timing above and the way several counts are combined are this design's
// choices.
module md1_controller
  import dtq_pkg::*;
#(
  parameter int unsigned K          = 6,
  parameter int unsigned R_CYCLES   = 150,
  parameter int unsigned OBS_CYCLES = 128,
  parameter int unsigned QDEPTH     = 256,
  parameter kval_t       TAU        = ave8_latencies(),
  parameter int unsigned NUM_Q      = 1
) (
  input  logic                        clk,
  input  logic                        rst_n,       // synchronous, active low
  // smart waiting queues, one per accelerator input
  output logic                        sample,
  input  logic [NUM_Q-1:0]            snap_valid,
  input  logic [$clog2(QDEPTH+1)-1:0] snap_count [NUM_Q],
  input  logic [NUM_Q-1:0]            snap_almost_full,
  input  logic [NUM_Q-1:0]            snap_empty,
  // accelerator
  input  logic                        acc_idle,
  output cfg_t                        cfg,
  // status
  output cfg_t                        next_cfg,
  output logic                        sym_valid,
  output symptom_e                    symptom,
  output logic                        cfg_changed
);
  localparam int unsigned CW = $clog2(QDEPTH + 1);

  logic [CW-1:0] w_hi, w_lo;
  logic [CW-1:0] n_max;
  logic          any_valid, any_af, all_empty;

  // the most loaded input queue decides
  always_comb begin
    n_max = '0;
    for (int q = 0; q < NUM_Q; q++)
      if (snap_count[q] > n_max) n_max = snap_count[q];
  end
  assign any_valid = |snap_valid;
  assign any_af    = |snap_almost_full;
  assign all_empty = &snap_empty;

  obs_timer #(.OBS_CYCLES(OBS_CYCLES)) u_timer (
    .clk, .rst_n, .tick(sample)
  );

  threshold_lut #(
    .K(K), .R_CYCLES(R_CYCLES), .OBS_CYCLES(OBS_CYCLES), .QDEPTH(QDEPTH), .TAU(TAU)
  ) u_lut (
    .cfg(next_cfg), .w_hi, .w_lo
  );

  symptom_detector #(.CW(CW)) u_sym (
    .cfg(next_cfg), .snap_valid(any_valid), .n_wait(n_max),
    .almost_full(any_af), .empty(all_empty),
    .w_hi, .w_lo, .sym_valid, .symptom
  );

  planner #(.K(K)) u_plan (
    .clk, .rst_n, .sym_valid, .symptom, .acc_idle,
    .next_cfg, .cfg, .changed(cfg_changed)
  );
  initial assert (NUM_Q >= 1) else $error("NUM_Q must be at least 1");
endmodule
