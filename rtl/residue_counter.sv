// residue_counter: residue number counter built from one modulo counter per
// modulus (by default the modulo 11, 13, 15 and 16 counters of the block
// diagram).
//
// All digit counters share the clock and the increment, so the whole residue
// number steps c -> c+1 with no carry between digits: each digit counter only
// wraps at its own modulus.  After prod(MODULI) increments every digit is back
// at 0.  The counter value c (0 .. prod-1) is therefore present on `count` as
// its residues c mod MODULI[i].  `at_zero` is high while c == 0 (every digit
// 0), `at_max` while c == prod-1, which is every digit at MODULI[i]-1, so a
// sweep ends when all digit counters wrap together on the same edge.
//
// Timing: one clock per count; outputs are registered counts plus
// combinational decodes.
module residue_counter #(
  parameter int N = rns_pkg::N_MOD,
  parameter logic [N-1:0][7:0] MODULI = rns_pkg::MODULI_15BIT
) (
  input  logic                                clk,
  input  logic                                rst,      // synchronous, active high
  input  logic                                inc,      // increment, all digits at once
  output logic [N-1:0][rns_pkg::DIGIT_W-1:0]  count,    // residue digits of the count
  output logic                                at_zero,  // count == 0
  output logic                                at_max    // count == prod(MODULI) - 1
);

  logic [N-1:0] digit_max;

  for (genvar i = 0; i < N; i++) begin : g_digit
    mod_counter #(.M(int'(MODULI[i])), .W(rns_pkg::DIGIT_W)) u_cnt (
      .clk    (clk),
      .rst    (rst),
      .inc    (inc),
      .q      (count[i]),
      .at_max (digit_max[i])
    );
  end

  assign at_zero = (count == '0);
  assign at_max  = &digit_max;

endmodule
