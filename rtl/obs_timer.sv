// obs_timer: observation-period generator of the online controller.
//
// The controller looks at the input queue only at regular instants, one
// observation period apart. This counter runs freely from reset and raises
// `tick` for one cycle every OBS_CYCLES cycles; the first tick comes
// OBS_CYCLES cycles after reset is released (in the cycle in which the
// counter reaches OBS_CYCLES-1). The default, 128 cycles, is an observation
// time of 1.28 us at a 100 MHz clock, the value used in the evaluation.
module obs_timer #(
  parameter int unsigned OBS_CYCLES = 128
) (
  input  logic clk,
  input  logic rst_n,   // synchronous, active low
  output logic tick
);
  localparam int unsigned CW = (OBS_CYCLES > 1) ? $clog2(OBS_CYCLES) : 1;

  logic [CW-1:0] cnt;

  assign tick = (cnt == CW'(OBS_CYCLES - 1));

  always_ff @(posedge clk) begin
    if (!rst_n)    cnt <= '0;
    else if (tick) cnt <= '0;
    else           cnt <= cnt + 1'b1;
  end

  initial assert (OBS_CYCLES >= 2) else $error("OBS_CYCLES must be at least 2");
endmodule
