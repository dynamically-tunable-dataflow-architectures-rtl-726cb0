// tb_obs_timer: checks that the observation timer ticks for exactly one cycle
// every OBS_CYCLES cycles, the first tick OBS_CYCLES cycles after reset.
module tb_obs_timer;
  localparam int unsigned OBS = 128;
  logic clk = 0, rst_n = 0, tick;
  int checks = 0, failures = 0;
  int cyc = 0, last = -1, nticks = 0;

  obs_timer dut (.clk, .rst_n, .tick);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // cycle 1 is the first cycle after reset release
    while (nticks < 10) begin
      @(posedge clk);
      cyc++;
      if (tick) begin
        if (last < 0) check(cyc == OBS, $sformatf("first tick at cycle %0d, expected %0d", cyc, OBS));
        else          check(cyc - last == OBS, $sformatf("tick interval %0d, expected %0d", cyc - last, OBS));
        last = cyc;
        nticks++;
      end
    end
    // a reset in the middle restarts the period
    repeat (17) @(posedge clk);
    rst_n <= 0;
    @(posedge clk);
    rst_n <= 1;
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!tick && cyc < 1000);
    check(cyc == OBS, $sformatf("tick after reset at %0d", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
