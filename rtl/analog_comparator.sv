// analog_comparator: BEHAVIOURAL MODEL of an analog voltage comparator.
// It stands for an analog part and is not meant for synthesis.
//
// The output is high while the + input is above the - input (plus an optional
// input offset), low otherwise.  In the A/D converter the analog input drives
// the + input and the ramp the - input, so the output falls when the input
// becomes less than (or equal to) the ramp.  The offset parameter is this
// model's addition, zero by default.
//
// Timing: combinational, no delay.
module analog_comparator #(
  parameter int OFFSET_UV = 0               // input offset voltage, microvolts
) (
  input  rns_pkg::uvolt_t vp_uv,            // + input
  input  rns_pkg::uvolt_t vn_uv,            // - input
  output logic            out               // vp > vn + offset
);

  assign out = (vp_uv > vn_uv + OFFSET_UV);

endmodule
