// residue_rom: one residue arithmetic lookup table, the equivalent of one
// 256 x 4 PROM.
//
// Two residue digits a and b (4 bits each) are concatenated into the 8-bit
// address {a, b}; the word at that address holds (a op b) mod M, where op is
// addition, subtraction (a - b) or multiplication, chosen by OP.  A table
// for a modulus up to 16 therefore always has 256 words of 4 bits.  The
// contents are computed when the design is elaborated; words whose address
// holds a digit >= M are never read by correct operands and hold the value
// for the operands taken mod M.
//
// Timing: combinational read, like an asynchronous PROM.
module residue_rom #(
  parameter int unsigned    M  = 16,                  // modulus, 2..16
  parameter rns_pkg::rns_op_e OP = rns_pkg::RNS_ADD   // table contents
) (
  input  rns_pkg::digit_t a,
  input  rns_pkg::digit_t b,
  output rns_pkg::digit_t y     // (a op b) mod M
);

  localparam int W     = rns_pkg::DIGIT_W;
  localparam int WORDS = 2 ** (2 * W);

  rns_pkg::digit_t table_mem [WORDS];

  initial begin
    for (int addr = 0; addr < WORDS; addr++) begin
      table_mem[addr] = rns_pkg::table_entry(M, OP, addr / (2 ** W), addr % (2 ** W));
    end
  end

  assign y = table_mem[{a, b}];

endmodule
