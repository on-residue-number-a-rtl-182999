// sample_hold: BEHAVIOURAL MODEL of the sample-output switch and its hold
// capacitor.  It stands for an analog circuit and is not meant for synthesis.
//
// While `sample` is high the switch is closed and the capacitor follows the
// input (the ramp); the voltage it held at the end of that clock cycle stays
// on the output until the next sample.  The capacitor is taken as ideal: no
// droop, no hysteresis.  Reset discharging it to 0 V is this model's choice.
//
// Timing: the output takes the input value present just before the clock
// edge that ends a cycle with `sample` high.
module sample_hold (
  input  logic            clk,
  input  logic            rst,      // synchronous; discharge to 0 V
  input  logic            sample,   // switch closed
  input  rns_pkg::uvolt_t vin_uv,   // voltage to sample (the ramp)
  output rns_pkg::uvolt_t vout_uv   // held voltage
);

  always_ff @(posedge clk) begin
    if (rst)          vout_uv <= '0;
    else if (sample)  vout_uv <= vin_uv;
  end

endmodule
