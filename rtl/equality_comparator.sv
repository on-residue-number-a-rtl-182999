// equality_comparator: the D/A converter's equality comparator.
//
// It compares the output register with the residue counter, bit by bit, and
// closes the sample-and-hold switch (`match` high) for the one clock of each
// ramp sweep in which every digit agrees.  Because the residue digits
// identify the count uniquely within a sweep, this is the moment the ramp
// stands at the voltage of the output number.  `digit_match` shows the
// comparison digit by digit.
//
// Timing: combinational.
module equality_comparator #(
  parameter int N = rns_pkg::N_MOD
) (
  input  logic [N-1:0][rns_pkg::DIGIT_W-1:0]  a,            // output register
  input  logic [N-1:0][rns_pkg::DIGIT_W-1:0]  b,            // residue counter
  output logic [N-1:0]                        digit_match,  // digit i agrees
  output logic                                match         // every bit agrees
);

  for (genvar i = 0; i < N; i++) begin : g_digit
    assign digit_match[i] = &(a[i] ~^ b[i]);
  end

  assign match = &digit_match;

endmodule
