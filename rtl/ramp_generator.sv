// ramp_generator: BEHAVIOURAL MODEL of the analog ramp (sawtooth) generator.
// It stands for an analog circuit and is not meant for synthesis.
//
// The ramp rises by STEP_UV microvolts each time the counters are
// incremented, starting at 0 V, and falls back to 0 V on the increment that
// wraps the residue counter, so it always equals count * STEP_UV for the
// value `count` (0 .. STEPS-1) held in the residue counter.  With the default
// STEP_UV = 1000 it runs from 0 to STEPS-1 millivolts, one millivolt per
// count.  The voltage is produced as a whole number of microvolts.
//
// An ideal linear ramp is modelled; a real one (an RC ramp, say) would be
// bowed, and would be straightened by the correction polynomials further on.
// The step size and the restart from the counter's wrap are this model's
// choices.
//
// Timing: ramp_uv changes on the same clock edge as the counters.
module ramp_generator #(
  parameter int unsigned STEPS   = 34320,   // counts per sweep (product of the moduli)
  parameter int          STEP_UV = 1000     // microvolts per count
) (
  input  logic            clk,
  input  logic            rst,       // synchronous; ramp back to 0 V
  input  logic            inc,       // the counters' increment
  input  logic            restart,   // the counter is at its last value: next step goes to 0 V
  output rns_pkg::uvolt_t ramp_uv    // ramp voltage
);

  // charge on the ramp capacitor, in steps
  int unsigned level;

  always_ff @(posedge clk) begin
    if (rst)            level <= 0;
    else if (inc)       level <= restart ? 0 : level + 1;
  end

  assign ramp_uv = 32'(level) * STEP_UV;

  a_in_sweep: assert property (@(posedge clk) disable iff (rst) level < STEPS);

endmodule
