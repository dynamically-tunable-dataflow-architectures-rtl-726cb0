// dyn_tunable_ave8: a dynamically-tunable dataflow stage built around the
// AVE8 moving-average accelerator.
//
//   in_* --> smart_waiting_queue --> ave8_acc --> output FIFO --> out_*
//                  |  N_wait, flags      ^ cfg
//                  +--> md1_controller --+
//
// Samples enter the smart waiting queue (IN_DEPTH entries). The accelerator
// takes one sample per iteration and runs in the configuration chosen by the
// M/D/1 controller: every OBS_CYCLES cycles the controller samples the queue
// occupancy, compares it with the thresholds W_k derived for the response
// bound R_CYCLES, and steps the configuration one level faster or slower.
// The change takes effect at the next iteration boundary. Results, tagged
// with the configuration that produced them, wait in an output FIFO
// (OUT_DEPTH entries) for the consumer; a full output FIFO stalls the
// accelerator, a full input queue stalls the producer (in_ready low).
//
// All handshakes are valid/ready. cfg, next_cfg and n_wait are status
// outputs. Defaults: 6 configurations, 1.5 us bound and 1.28 us observation
// at a 100 MHz clock, as in the evaluation; the 256-entry queues, the 16-bit
// samples and the AVE8 variants are this design's choices.
module dyn_tunable_ave8
  import dtq_pkg::*;
#(
  parameter int unsigned DATA_W     = 16,
  parameter int unsigned IN_DEPTH   = 256,
  parameter int unsigned OUT_DEPTH  = 256,
  parameter int unsigned AF_MARGIN  = 32,
  parameter int unsigned K          = 6,
  parameter int unsigned OBS_CYCLES = 128,
  parameter int unsigned R_CYCLES   = 150
) (
  input  logic                          clk,
  input  logic                          rst_n,    // synchronous, active low
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [DATA_W-1:0]             in_data,
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic [DATA_W-1:0]             out_data,
  output cfg_t                          out_cfg,
  output cfg_t                          cfg,
  output cfg_t                          next_cfg,
  output logic [$clog2(IN_DEPTH+1)-1:0] n_wait
);
  localparam int unsigned CW  = $clog2(IN_DEPTH + 1);
  localparam int unsigned OCW = $clog2(OUT_DEPTH + 1);

  // input queue <-> accelerator
  logic              q_valid, q_ready;
  logic [DATA_W-1:0] q_data;
  logic              q_full, q_af, q_empty;
  // controller snapshot
  logic              sample, snap_valid, snap_af, snap_empty;
  logic [CW-1:0]     snap_count;
  logic [CW-1:0]     snap_counts [1];
  // accelerator <-> output FIFO
  logic              acc_idle, r_valid, r_ready;
  logic [DATA_W-1:0] r_data;
  cfg_t              r_cfg;
  // controller status
  logic              sym_valid, cfg_changed;
  symptom_e          symptom;
  // output FIFO status (not used further)
  logic [OCW-1:0]    o_count, o_snap_count;
  logic              o_full, o_af, o_empty, o_snap_valid, o_snap_af, o_snap_empty;

  // status signals only observed in simulation
  logic unused_status;
  assign unused_status = ^{q_full, q_af, q_empty, sym_valid, cfg_changed, symptom, o_count,
                           o_snap_count, o_full, o_af, o_empty, o_snap_valid, o_snap_af,
                           o_snap_empty};

  smart_waiting_queue #(.DATA_W(DATA_W), .DEPTH(IN_DEPTH), .AF_MARGIN(AF_MARGIN)) u_in_q (
    .clk, .rst_n,
    .push_valid(in_valid), .push_ready(in_ready), .push_data(in_data),
    .pop_valid(q_valid), .pop_ready(q_ready), .pop_data(q_data),
    .count(n_wait), .full(q_full), .almost_full(q_af), .empty(q_empty),
    .sample, .snap_valid, .snap_count, .snap_almost_full(snap_af), .snap_empty
  );

  assign snap_counts[0] = snap_count;

  md1_controller #(
    .K(K), .R_CYCLES(R_CYCLES), .OBS_CYCLES(OBS_CYCLES), .QDEPTH(IN_DEPTH),
    .TAU(ave8_latencies()), .NUM_Q(1)
  ) u_ctrl (
    .clk, .rst_n,
    .sample, .snap_valid, .snap_count(snap_counts), .snap_almost_full(snap_af), .snap_empty,
    .acc_idle, .cfg, .next_cfg, .sym_valid, .symptom, .cfg_changed
  );

  ave8_acc #(.DATA_W(DATA_W), .K(K)) u_acc (
    .clk, .rst_n,
    .in_valid(q_valid), .in_ready(q_ready), .in_data(q_data),
    .cfg, .idle(acc_idle),
    .out_valid(r_valid), .out_ready(r_ready), .out_data(r_data), .out_cfg(r_cfg)
  );

  smart_waiting_queue #(.DATA_W(DATA_W + CFG_W), .DEPTH(OUT_DEPTH), .AF_MARGIN(1)) u_out_q (
    .clk, .rst_n,
    .push_valid(r_valid), .push_ready(r_ready), .push_data({r_cfg, r_data}),
    .pop_valid(out_valid), .pop_ready(out_ready), .pop_data({out_cfg, out_data}),
    .count(o_count), .full(o_full), .almost_full(o_af), .empty(o_empty),
    .sample(1'b0), .snap_valid(o_snap_valid), .snap_count(o_snap_count),
    .snap_almost_full(o_snap_af), .snap_empty(o_snap_empty)
  );
endmodule
