// planner: turns symptoms into configuration changes and applies them to the
// accelerator only between iterations.
//
// The planner keeps two registers. `next_cfg` is the decided configuration:
// on every valid symptom it moves one step, SPEED_UP to next_cfg+1 (up to
// K-1), SLOW_DOWN to next_cfg-1 (down to 0), STAY leaves it. `cfg` is the
// configuration driven to the accelerator; it takes the value of next_cfg
// only in a cycle in which the accelerator reports `acc_idle` (no iteration
// in progress), so an iteration always runs from start to end in one
// configuration. A decision made while an iteration runs is held until that
// iteration has ended. Both registers reset to 0, the exact configuration.
//
// `changed` pulses in the cycle after cfg took a new value (status only).
module planner
  import dtq_pkg::*;
#(
  parameter int unsigned K = 6
) (
  input  logic     clk,
  input  logic     rst_n,      // synchronous, active low
  input  logic     sym_valid,
  input  symptom_e symptom,
  input  logic     acc_idle,
  output cfg_t     next_cfg,
  output cfg_t     cfg,
  output logic     changed
);
  cfg_t decided;

  always_comb begin
    decided = next_cfg;
    if (sym_valid) begin
      unique case (symptom)
        SYM_SPEED_UP:  if (next_cfg < cfg_t'(K - 1)) decided = next_cfg + 1'b1;
        SYM_SLOW_DOWN: if (next_cfg != '0)           decided = next_cfg - 1'b1;
        default:       decided = next_cfg;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      next_cfg <= '0;
      cfg      <= '0;
      changed  <= 1'b0;
    end else begin
      next_cfg <= decided;
      changed  <= 1'b0;
      if (acc_idle && cfg != decided) begin
        cfg     <= decided;
        changed <= 1'b1;
      end
    end
  end

  // The applied configuration only changes while the accelerator is idle.
  assert property (@(posedge clk) disable iff (!rst_n) !acc_idle |=> $stable(cfg));
  assert property (@(posedge clk) disable iff (!rst_n) cfg < cfg_t'(K));
endmodule
