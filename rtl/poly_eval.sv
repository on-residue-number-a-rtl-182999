// poly_eval: residue polynomial evaluator, p' = a + b x p repeated (Horner's
// rule).
//
// The variable is held in the B latch, the coefficients circulate in a shift
// register A, and the running value sits in the P register.  Each clock the
// multiplier tables form B x P and the adder tables add the coefficient at
// the head of the shift register; the sum is written back to P while the
// shift register rotates by one place.  After ORDER+1 steps P holds
//   y = a[ORDER] x^ORDER + ... + a[1] x + a[0]   (mod the product of the moduli)
// and the coefficients are back in their starting places, ready for the next
// variable.  The multiplier output feeds the adder directly, so a step is
// one multiplier table access followed by one adder table access.
//
// Loading coefficients: pulse coef_shift with coef_in = a[ORDER] first and
// a[0] last (ORDER+1 pulses).  After reset the coefficients are those of
// y = x, so the evaluator passes its variable through until loaded.
//
// Interface and timing: `start` with the variable on x (ignored while busy);
// `done` pulses and `y` is valid ORDER+1 clocks after the clock edge that
// took `start`; y holds until the next start.  A new variable can be taken
// every ORDER+2 clocks (start is accepted in the cycle done is high).  The
// step structure follows the original scheme; the handshake, the reset
// coefficients and the loading order are this design's choices.
module poly_eval #(
  parameter int N = rns_pkg::N_MOD,
  parameter logic [N-1:0][7:0] MODULI = rns_pkg::MODULI_15BIT,
  parameter int ORDER = 8                     // degree of the polynomial
) (
  input  logic                                clk,
  input  logic                                rst,        // synchronous, active high
  input  logic                                coef_shift, // shift coef_in into A (when idle)
  input  logic [N-1:0][rns_pkg::DIGIT_W-1:0]  coef_in,    // coefficient, a[ORDER] first
  input  logic                                start,      // evaluate at x
  input  logic [N-1:0][rns_pkg::DIGIT_W-1:0]  x,          // variable
  output logic                                busy,       // evaluation in progress
  output logic                                done,       // y valid (pulse)
  output logic [N-1:0][rns_pkg::DIGIT_W-1:0]  y           // polynomial value
);

  typedef logic [N-1:0][rns_pkg::DIGIT_W-1:0] num_t;
  localparam int CW = $clog2(ORDER + 2);

  // residue number with every digit 1: the value 1
  localparam num_t ONE = {N{rns_pkg::digit_t'(1)}};

  num_t           coef [ORDER+1];   // coef[0] is the head, used next
  num_t           b_latch;
  num_t           p_reg;
  num_t           prod, sum;
  logic [CW-1:0]  steps_left;

  residue_alu #(.N(N), .MODULI(MODULI), .OP(rns_pkg::RNS_MUL)) u_mult (
    .a (b_latch), .b (p_reg), .y (prod)
  );

  residue_alu #(.N(N), .MODULI(MODULI), .OP(rns_pkg::RNS_ADD)) u_add (
    .a (coef[0]), .b (prod), .y (sum)
  );

  assign busy = (steps_left != '0);
  assign y    = p_reg;

  // coefficient shift register: shifts in new coefficients when idle,
  // rotates one place per evaluation step
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k <= ORDER; k++) coef[k] <= '0;
      coef[ORDER-1] <= ONE;              // a[1] = 1: y = x
    end else if (busy || (coef_shift && !busy)) begin
      for (int k = 0; k < ORDER; k++) coef[k] <= coef[k+1];
      coef[ORDER] <= busy ? coef[0] : coef_in;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      b_latch    <= '0;
      p_reg      <= '0;
      steps_left <= '0;
      done       <= 1'b0;
    end else begin
      done <= (steps_left == CW'(1));
      if (busy) begin
        p_reg      <= sum;
        steps_left <= steps_left - 1'b1;
      end else if (start) begin
        b_latch    <= x;
        p_reg      <= '0;
        steps_left <= CW'(ORDER + 1);
      end
    end
  end

  a_no_load_while_busy: assert property (@(posedge clk) disable iff (rst) busy |-> !coef_shift)
    else $error("poly_eval: coefficient shifted in during an evaluation");

  initial assert (ORDER >= 1) else $error("poly_eval: ORDER must be at least 1");

endmodule
