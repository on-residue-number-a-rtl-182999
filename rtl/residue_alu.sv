// residue_alu: residue number adder, subtractor or multiplier built as one
// lookup table per digit.
//
// Residue arithmetic works digit by digit with no carries: digit i of the
// result is (a[i] op b[i]) mod MODULI[i], read from a 256-word table addressed
// by the two operand digits.  With the moduli 15, 16 this is two 256 x 4
// tables; with 11, 13, 15, 16 it is four.  OP selects the operation (all
// digits use the same one).
//
// Timing: combinational, one table access.
module residue_alu #(
  parameter int N = rns_pkg::N_MOD,
  parameter logic [N-1:0][7:0] MODULI = rns_pkg::MODULI_15BIT,
  parameter rns_pkg::rns_op_e OP = rns_pkg::RNS_ADD
) (
  input  logic [N-1:0][rns_pkg::DIGIT_W-1:0] a,
  input  logic [N-1:0][rns_pkg::DIGIT_W-1:0] b,
  output logic [N-1:0][rns_pkg::DIGIT_W-1:0] y     // a op b, digit by digit
);

  for (genvar i = 0; i < N; i++) begin : g_digit
    residue_rom #(.M(int'(MODULI[i])), .OP(OP)) u_rom (
      .a (a[i]),
      .b (b[i]),
      .y (y[i])
    );
  end

endmodule
