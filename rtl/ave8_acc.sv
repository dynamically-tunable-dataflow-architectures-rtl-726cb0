// ave8_acc: multi-variant moving-average accelerator (AVE8).
//
// Each iteration takes one sample from the input queue and produces the mean
// of the most recent samples. The exact configuration 0 averages the last 8
// samples; configuration k averages only the last 8-k, trading accuracy for
// speed: the samples are summed one per cycle, so an iteration takes
// (8-k)+2 cycles (load, 8-k accumulate cycles, output) when the consumer is
// ready. The mean is floor(sum / window), computed exactly by multiplying
// with a reciprocal constant (see dtq_pkg::ave8_recip).
//
// Interface: in_valid / in_ready / in_data is the read side of the input
// queue; in_ready is high only while the accelerator is idle, so a transfer
// starts an iteration. `cfg` must stay constant from the start of an
// iteration to its end; `idle` tells the controller when it may change it.
// out_valid / out_ready / out_data / out_cfg hand the result, with the
// configuration that produced it, to the output queue.
//
// History: 8 samples, zero after reset. A moving average with a
// variable window is the described example; the window sizes 8..3, the
// one-sample-per-cycle schedule and the exact division are this design's
// choices.
module ave8_acc
  import dtq_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned K      = 6
) (
  input  logic              clk,
  input  logic              rst_n,     // synchronous, active low
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  input  cfg_t              cfg,
  output logic              idle,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data,
  output cfg_t              out_cfg
);
  localparam int unsigned SHIFT = DATA_W + 6;
  localparam int unsigned SUM_W = DATA_W + 3;
  localparam int unsigned RCP_W = SHIFT + 1;

  typedef enum logic [1:0] {S_IDLE, S_ACC, S_OUT} state_e;

  state_e            state;
  logic [DATA_W-1:0] hist [AVE_MAX_WIN];   // hist[0] is the newest sample
  logic [SUM_W-1:0]  sum;
  logic [2:0]        idx;
  logic [3:0]        win;
  logic [RCP_W-1:0]  recip;
  logic [SUM_W+RCP_W-1:0] prod;

  // window and reciprocal of the configuration
  always_comb begin
    win   = 4'(ave8_window(32'(cfg)));
    recip = '0;
    for (int unsigned k = 0; k < K_MAX; k++)
      if (cfg == cfg_t'(k)) recip = RCP_W'(ave8_recip(ave8_window(k), SHIFT));
  end

  assign prod      = SUM_W'(sum) * recip;
  assign out_data  = DATA_W'(prod >> SHIFT);
  assign out_cfg   = cfg;
  assign idle      = (state == S_IDLE);
  assign in_ready  = idle;
  assign out_valid = (state == S_OUT);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      sum   <= '0;
      idx   <= '0;
      for (int i = 0; i < AVE_MAX_WIN; i++) hist[i] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          hist[0] <= in_data;
          for (int i = 1; i < AVE_MAX_WIN; i++) hist[i] <= hist[i-1];
          sum   <= '0;
          idx   <= '0;
          state <= S_ACC;
        end
        S_ACC: begin
          sum <= sum + SUM_W'(hist[idx]);
          idx <= idx + 1'b1;
          if (4'(idx) == win - 4'd1) state <= S_OUT;
        end
        S_OUT: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // the configuration is held for the whole iteration
  assert property (@(posedge clk) disable iff (!rst_n) (state != S_IDLE) |=> (state == S_IDLE) || $stable(cfg));
  initial assert (K >= 1 && K <= AVE_MAX_WIN) else $error("K must be 1..8");
endmodule
