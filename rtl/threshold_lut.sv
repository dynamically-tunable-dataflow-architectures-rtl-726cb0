// threshold_lut: look-up table of the M/D/1 queue thresholds W_k.
//
// For each configuration k the table holds W_k, the largest number of waiting
// jobs for which configuration k still meets the response-time bound
// R_CYCLES, given the observation period OBS_CYCLES (see dtq_pkg for the
// model). The contents are computed at elaboration from the service times
// TAU[k] (cycles) by dtq_pkg::md1_thresholds, so the table is a constant
// ROM in hardware. A configuration is admissible only if its threshold is
// smaller than the input queue depth QDEPTH; elaboration stops with an error
// otherwise.
//
// Read port (combinational): for the configuration `cfg` it returns
//   w_hi = W_cfg      (above it the accelerator must go faster)
//   w_lo = W_(cfg-1)  (below it the accelerator may go slower; 0 for cfg 0)
// The defaults are the evaluation's R = 1.5 us and T_obs = 1.28 us at
// 100 MHz and the service times of this design's AVE8 accelerator, which give
// W = {12, 13, 15, 17, 20, 25}.
module threshold_lut
  import dtq_pkg::*;
#(
  parameter int unsigned K          = 6,
  parameter int unsigned R_CYCLES   = 150,
  parameter int unsigned OBS_CYCLES = 128,
  parameter int unsigned QDEPTH     = 256,
  parameter kval_t       TAU        = ave8_latencies()
) (
  input  cfg_t                        cfg,
  output logic [$clog2(QDEPTH+1)-1:0] w_hi,
  output logic [$clog2(QDEPTH+1)-1:0] w_lo
);
  localparam int unsigned CW = $clog2(QDEPTH + 1);
  localparam kval_t W = md1_thresholds(TAU, K, R_CYCLES, OBS_CYCLES);

  logic [CW-1:0] rom [K_MAX];

  for (genvar k = 0; k < K_MAX; k++) begin : g_rom
    if (k < K) begin : g_used
      if (W[k] >= QDEPTH) begin : g_inadmissible
        $error("threshold_lut: configuration %0d needs W=%0d, not below the queue depth %0d",
               k, W[k], QDEPTH);
      end
      assign rom[k] = CW'(W[k]);
    end else begin : g_unused
      assign rom[k] = '0;
    end
  end

  assign w_hi = rom[cfg];
  assign w_lo = (cfg == '0) ? '0 : rom[cfg - 1'b1];

  initial assert (K >= 1 && K <= K_MAX) else $error("K must be 1..%0d", K_MAX);
endmodule
