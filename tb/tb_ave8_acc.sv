// tb_ave8_acc: random samples, configurations and consumer stalls against a
// reference moving average. Checks every result (floor of the mean of the
// last 8-k samples, zeros before the first samples), its configuration tag,
// and the iteration time of (8-k)+2 cycles when input and output never wait.
module tb_ave8_acc;
  import dtq_pkg::*;
  localparam int unsigned DW = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, idle, out_valid, out_ready;
  logic [DW-1:0] in_data, out_data;
  cfg_t cfg, out_cfg;
  int checks = 0, failures = 0;
  longint unsigned hist [$];
  int n_out = 0, n_stall = 0;

  ave8_acc #(.DATA_W(DW), .K(6)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .cfg,
                                      .idle, .out_valid, .out_ready, .out_data, .out_cfg);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic longint unsigned ref_avg(int k);
    longint unsigned s = 0;
    int w = 8 - k;
    for (int i = 0; i < w; i++) s += hist[i];
    return s / w;
  endfunction

  // One iteration, all stimulus changed at falling edges. Returns the number
  // of cycles from the edge that accepts the sample to the handover edge.
  task automatic run_one(int k, logic [DW-1:0] d, bit stall_out, output int cycles);
    @(negedge clk);
    cfg = cfg_t'(k); in_valid = 1; in_data = d; out_ready = 0;
    while (!in_ready) @(negedge clk);
    @(posedge clk);                                   // accepted at this edge
    hist.push_front(longint'(d));
    cycles = 0;
    forever begin
      @(negedge clk);
      cycles++;
      in_valid = 0;
      out_ready = stall_out ? ($urandom_range(3) == 0) : 1'b1;
      if (out_valid && out_ready) begin
        check(longint'(out_data) == ref_avg(k), $sformatf("cfg %0d: avg %0d expected %0d", k, out_data, ref_avg(k)));
        check(out_cfg == cfg_t'(k), "configuration tag");
        n_out++;
        @(posedge clk);
        break;
      end
      if (out_valid) n_stall++;
    end
  endtask

  initial begin
    int c;
    in_valid = 0; out_ready = 0; in_data = '0; cfg = '0;
    for (int i = 0; i < 8; i++) hist.push_back(0);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // latency per configuration, extreme samples
    for (int k = 0; k < 6; k++) begin
      run_one(k, 16'hFFFF, 0, c);
      // the next sample is accepted in the cycle after the handover
      check(c + 1 == 8 - k + 2, $sformatf("cfg %0d: %0d cycles per sample, expected %0d", k, c + 1, 8 - k + 2));
    end
    for (int i = 0; i < 2000; i++) begin
      run_one($urandom_range(5), DW'($urandom), $urandom_range(3) == 0, c);
    end
    check(n_stall > 0, "output never stalled");
    $display("results=%0d stalls=%0d", n_out, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d results", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
