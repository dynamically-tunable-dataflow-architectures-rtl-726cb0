// tb_md1_controller: drives the controller with a modelled waiting queue
// (snapshot one cycle after each `sample`) and a modelled accelerator
// (`acc_idle`). Checks the observation period, the timing of each decision
// (decided configuration two cycles after the tick, applied at once when the
// accelerator is idle, held while it is busy), the climb to the fastest
// configuration under a long queue, the almost-full rule, the hysteresis band
// between W_(k-1) and W_k, and the return to configuration 0 on an empty
// queue. A second controller watches two queues: the first mirrors the
// single queue, the second is normally empty and is then loaded alone, to
// check that the most loaded queue decides and that one almost-full queue is
// enough to speed up.
module tb_md1_controller;
  import dtq_pkg::*;
  localparam int unsigned OBS = 128, QD = 256;
  localparam int unsigned CW = $clog2(QD + 1);
  localparam int W [6] = '{12, 13, 15, 17, 20, 25};

  logic clk = 0, rst_n = 0;
  logic sample, snap_valid = 0, snap_af = 0, snap_empty = 0, acc_idle = 1;
  logic [CW-1:0] snap_count = '0;
  logic [CW-1:0] snap_counts [1];
  cfg_t cfg, next_cfg;
  logic sym_valid, cfg_changed;
  symptom_e symptom;
  // two-queue controller
  logic [CW-1:0] snap2_count [2];
  logic [1:0] snap2_af = '0, snap2_empty = '1;
  logic sample2, sym2_valid, cfg2_changed;
  cfg_t cfg2, next2_cfg;
  symptom_e symptom2;
  int q1_n = 0; bit q1_af = 0;
  int checks = 0, failures = 0;

  // queue model: occupancy and flags presented at the next snapshot
  int q_n = 0; bit q_af = 0;
  int cyc = 0, last_tick = 0;

  assign snap_counts[0] = snap_count;

  md1_controller dut (.clk, .rst_n, .sample, .snap_valid, .snap_count(snap_counts),
                      .snap_almost_full(snap_af), .snap_empty, .acc_idle,
                      .cfg, .next_cfg, .sym_valid, .symptom, .cfg_changed);

  md1_controller #(.NUM_Q(2)) dut2 (
    .clk, .rst_n, .sample(sample2), .snap_valid({2{snap_valid}}), .snap_count(snap2_count),
    .snap_almost_full(snap2_af), .snap_empty(snap2_empty), .acc_idle,
    .cfg(cfg2), .next_cfg(next2_cfg), .sym_valid(sym2_valid), .symptom(symptom2),
    .cfg_changed(cfg2_changed));

  always #5 clk = ~clk;

  always @(posedge clk) cyc <= cyc + 1;

  always_ff @(posedge clk) begin
    snap_valid <= sample;
    if (sample) begin
      snap_count <= CW'(q_n);
      snap_af    <= q_af;
      snap_empty <= (q_n == 0);
      snap2_count[0] <= CW'(q_n);
      snap2_count[1] <= CW'(q1_n);
      snap2_af       <= {q1_af, q_af};
      snap2_empty    <= {q1_n == 0, q_n == 0};
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // wait for the next tick and check what the controller decides
  task automatic observe(int exp_next, bit idle_after, string what, int exp2 = -1);
    int cfg_before;
    cfg_before = int'(cfg);
    do @(posedge clk); while (!sample);
    if (last_tick != 0) check(cyc - last_tick == OBS, $sformatf("observation period %0d", cyc - last_tick));
    last_tick = cyc;
    acc_idle <= idle_after;
    @(posedge clk);            // snapshot registered
    @(posedge clk);            // decision registered
    #1;
    check(int'(next_cfg) == exp_next, $sformatf("%s: next_cfg %0d expected %0d", what, next_cfg, exp_next));
    if (exp2 < 0) exp2 = exp_next;
    check(int'(next2_cfg) == exp2, $sformatf("%s: two-queue next_cfg %0d expected %0d", what, next2_cfg, exp2));
    check(sample2 == 1'b0, "two controllers out of step");
    if (idle_after) check(int'(cfg) == exp_next, $sformatf("%s: cfg %0d not applied", what, cfg));
    else            check(int'(cfg) == cfg_before, $sformatf("%s: cfg changed while busy", what));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    check(cfg == '0, "reset configuration");
    // long queue: one step faster per observation, saturating at 5
    q_n = 100;
    for (int k = 1; k <= 6; k++) observe((k > 5) ? 5 : k, 1, "climb");
    // busy accelerator: decision held, then applied when idle
    q_n = 0;
    observe(4, 0, "busy");
    repeat (10) @(posedge clk);
    check(int'(cfg) == 5, "cfg held while busy");
    acc_idle <= 1;
    @(posedge clk); #1;
    @(posedge clk); #1;
    check(int'(cfg) == 4, "deferred change applied when idle");
    // hysteresis band: W3 <= n <= W4 keeps configuration 4
    q_n = W[3];
    observe(4, 1, "band low edge");
    q_n = W[4];
    observe(4, 1, "band high edge");
    q_n = W[4] + 1;
    observe(5, 1, "above W4");
    q_n = W[4] - 1;            // inside band of configuration 5 (W4 <= n <= W5)? no: below W4
    observe(4, 1, "below W4");
    // empty queue: back to configuration 0 step by step
    q_n = 0;
    for (int k = 3; k >= -1; k--) observe((k < 0) ? 0 : k, 1, "descend");
    // almost full with a small count forces speed-up
    q_n = 5; q_af = 1;
    observe(1, 1, "almost full");
    q_af = 0;
    q_n = 5;                  // 5 < W0 in configuration 1: slow down
    observe(0, 1, "below W0");
    // second queue loaded alone: only the two-queue controller speeds up
    q_n = 0; q1_n = 100;
    observe(0, 1, "second queue long", 1);
    observe(0, 1, "second queue long", 2);
    // second queue almost full with a small count
    q1_n = 14; q1_af = 1;      // 14 is inside the band of configuration 2 (13..15)
    observe(0, 1, "second queue almost full", 3);
    q1_af = 0;
    observe(0, 1, "second queue below W2", 2);
    q1_n = 13;                 // band of configuration 2: stay although queue 0 is empty
    observe(0, 1, "one queue empty, other in band", 2);
    q1_n = 0;
    observe(0, 1, "both empty", 1);
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
