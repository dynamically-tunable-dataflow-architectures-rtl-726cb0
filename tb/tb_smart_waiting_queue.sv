// tb_smart_waiting_queue: random pushes and pops against a reference queue.
// Checks data order, the occupancy counter, the full / almost-full / empty
// flags, backpressure when full, and the snapshot taken on `sample`.
module tb_smart_waiting_queue;
  localparam int unsigned DW = 12, DEPTH = 16, AFM = 4;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0;
  logic push_valid = 0, push_ready, pop_valid, pop_ready = 0, sample = 0;
  logic [DW-1:0] push_data = '0, pop_data;
  logic [CW-1:0] count, snap_count;
  logic full, almost_full, empty, snap_valid, snap_af, snap_empty;

  int checks = 0, failures = 0, n_full = 0, n_snap = 0;
  logic [DW-1:0] model [$];
  int exp_snap_count; bit exp_snap_af, exp_snap_empty, pending_snap;
  bit dpop, dpush; logic [DW-1:0] dval;

  smart_waiting_queue #(.DATA_W(DW), .DEPTH(DEPTH), .AF_MARGIN(AFM)) dut (
    .clk, .rst_n, .push_valid, .push_ready, .push_data, .pop_valid, .pop_ready, .pop_data,
    .count, .full, .almost_full, .empty, .sample, .snap_valid, .snap_count,
    .snap_almost_full(snap_af), .snap_empty);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    pending_snap = 0;
    for (int i = 0; i < 4000; i++) begin
      // phases: fill-biased, drain-biased, balanced
      automatic int pp = (i % 1000 < 400) ? 80 : (i % 1000 < 700) ? 20 : 50;
      push_valid <= ($urandom_range(99) < pp);
      pop_ready  <= ($urandom_range(99) < 100 - pp);
      push_data  <= DW'($urandom);
      sample     <= ($urandom_range(9) == 0);
      @(negedge clk);
      // combinational view against the model
      check(count == CW'(model.size()), $sformatf("count %0d vs %0d", count, model.size()));
      check(full == (model.size() == DEPTH), "full flag");
      check(empty == (model.size() == 0), "empty flag");
      check(almost_full == (model.size() >= DEPTH - AFM), "almost_full flag");
      check(push_ready == !full, "push_ready");
      check(pop_valid == !empty, "pop_valid");
      if (model.size() > 0) check(pop_data == model[0], "pop data order");
      if (snap_valid) begin
        n_snap++;
        check(pending_snap, "snapshot without sample");
        check(snap_count == CW'(exp_snap_count) && snap_af == exp_snap_af && snap_empty == exp_snap_empty,
              $sformatf("snapshot %0d, expected %0d", snap_count, exp_snap_count));
      end else check(!pending_snap, "sample not followed by snap_valid");
      pending_snap = sample;
      if (sample) begin
        exp_snap_count = model.size();
        exp_snap_af    = (model.size() >= DEPTH - AFM);
        exp_snap_empty = (model.size() == 0);
      end
      if (full) n_full++;
      dpop  = pop_valid && pop_ready;
      dpush = push_valid && push_ready;
      dval  = push_data;
      @(posedge clk);
      // update the model with what was transferred at this edge
      if (dpop)  void'(model.pop_front());
      if (dpush) model.push_back(dval);
    end
    check(n_full > 0, "queue never filled");
    check(n_snap > 0, "no snapshot taken");
    $display("full cycles=%0d snapshots=%0d", n_full, n_snap);
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
