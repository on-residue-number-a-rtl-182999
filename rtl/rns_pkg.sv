// rns_pkg: shared constants, types and table functions for the residue
// number system (RNS) converters and arithmetic units.
//
// A residue number is a vector of digits, digit i being the value modulo the
// i-th modulus.  Every digit is held in DIGIT_W = 4 bits, enough for any of the
// moduli used here (at most 16).  The default moduli are 11, 13, 15 and 16,
// the "fifteen bit" set (product 34320); the "eight bit" set is 15, 16
// (product 240).  Digit 0 is the modulo-11 digit, digit 3 the modulo-16 digit,
// in the left-to-right order of the counters in the block diagram.
//
// Modules take the moduli as a packed parameter, one byte per modulus,
// MODULI[i] being modulus i.  The table functions below give the contents of
// the 256-word lookup tables (address = {a, b}) for the three operations.
package rns_pkg;

  localparam int DIGIT_W = 4;                 // bits per residue digit
  localparam int N_MOD   = 4;                 // digits in the default set
  typedef logic [DIGIT_W-1:0] digit_t;
  typedef logic [N_MOD-1:0][7:0] moduli_t;

  // "fifteen bit" set 11, 13, 15, 16 and "eight bit" set 15, 16
  localparam moduli_t MODULI_15BIT = {8'd16, 8'd15, 8'd13, 8'd11};
  localparam logic [1:0][7:0] MODULI_8BIT = {8'd16, 8'd15};

  // default residue number: four digits
  typedef logic [N_MOD-1:0][DIGIT_W-1:0] rns_t;

  // an analog voltage, as a signed whole number of microvolts; used by the
  // behavioural models of the analog parts
  typedef logic signed [31:0] uvolt_t;

  // operation held by one lookup table
  typedef enum logic [1:0] {
    RNS_ADD = 2'd0,
    RNS_SUB = 2'd1,
    RNS_MUL = 2'd2
  } rns_op_e;

  // one table entry: (a op b) mod m.  Digits a, b are taken modulo m first, so
  // addresses holding a digit >= m (never produced by the arithmetic) still
  // read a legal digit.
  function automatic digit_t table_entry(int unsigned m, rns_op_e op,
                                         int unsigned a, int unsigned b);
    int unsigned ra, rb, r;
    ra = a % m;
    rb = b % m;
    unique case (op)
      RNS_ADD: r = (ra + rb) % m;
      RNS_SUB: r = (ra + m - rb) % m;
      default: r = (ra * rb) % m;
    endcase
    return DIGIT_W'(r);
  endfunction

endpackage
