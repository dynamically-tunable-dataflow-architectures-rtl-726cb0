// symptom_detector: compares the sampled queue occupancy with the thresholds
// of the current configuration k and classifies the situation.
//
//   SPEED_UP   N_wait > W_k, or the queue was almost full: jobs accumulate,
//              the accelerator must go to the faster configuration k+1.
//   SLOW_DOWN  k > 0 and (N_wait < W_(k-1), or the queue was empty): the
//              queue is draining, the accelerator may return to the more
//              accurate configuration k-1.
//   STAY       otherwise.
// Purely combinational; `sym_valid` follows `snap_valid` so that the planner
// acts once per observation.
//
// The three cases and the almost-full / empty rules follow the described
// design; the priority of SPEED_UP over SLOW_DOWN is this design's choice
// (both cannot hold at once with increasing thresholds).
module symptom_detector
  import dtq_pkg::*;
#(
  parameter int unsigned CW = 9    // width of the occupancy count
) (
  input  cfg_t          cfg,
  input  logic          snap_valid,
  input  logic [CW-1:0] n_wait,
  input  logic          almost_full,
  input  logic          empty,
  input  logic [CW-1:0] w_hi,
  input  logic [CW-1:0] w_lo,
  output logic          sym_valid,
  output symptom_e      symptom
);
  always_comb begin
    if (n_wait > w_hi || almost_full)
      symptom = SYM_SPEED_UP;
    else if (cfg != '0 && (n_wait < w_lo || empty))
      symptom = SYM_SLOW_DOWN;
    else
      symptom = SYM_STAY;
  end

  assign sym_valid = snap_valid;
endmodule
