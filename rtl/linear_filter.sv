// linear_filter: residue FIR filter, y[n] = sum over j of c[j] x[n-j].
//
// A linear expression, the sum of products of coefficients and values, formed
// with one residue multiplier and one residue adder (lookup tables per digit)
// used once per tap.  Each new sample is shifted into a delay line holding the
// last TAPS samples; then, one tap per clock, the multiplier forms
// c[j] x[n-j] and the adder adds it into an accumulator.  All arithmetic is
// modulo the product of the moduli.  At the output of the D/A converter such
// a filter can compensate the hold capacitor's memory of earlier samples.
//
// Loading coefficients: pulse coef_shift with coef_in = c[TAPS-1] first and
// c[0] last.  After reset c[0] = 1 and the rest 0: the filter passes samples
// through until loaded.  The delay line is cleared by reset.
//
// Interface and timing: in_valid with the sample on x (ignored while busy);
// out_valid pulses and y is valid TAPS clocks after the clock edge that took
// the sample; y holds until the next result.  One sample per TAPS+1 clocks.
// The number of taps, the sequential structure, the handshake and the
// reset values are this design's choices.
module linear_filter #(
  parameter int N = rns_pkg::N_MOD,
  parameter logic [N-1:0][7:0] MODULI = rns_pkg::MODULI_15BIT,
  parameter int TAPS = 4
) (
  input  logic                                clk,
  input  logic                                rst,        // synchronous, active high
  input  logic                                coef_shift, // shift coef_in into the coefficients (when idle)
  input  logic [N-1:0][rns_pkg::DIGIT_W-1:0]  coef_in,    // coefficient, c[TAPS-1] first
  input  logic                                in_valid,   // new sample on x
  input  logic [N-1:0][rns_pkg::DIGIT_W-1:0]  x,          // input sample
  output logic                                busy,       // filtering in progress
  output logic                                out_valid,  // y valid (pulse)
  output logic [N-1:0][rns_pkg::DIGIT_W-1:0]  y           // filter output
);

  typedef logic [N-1:0][rns_pkg::DIGIT_W-1:0] num_t;
  localparam int CW = $clog2(TAPS + 1);
  localparam int TW = (TAPS > 1) ? $clog2(TAPS) : 1;
  localparam num_t ONE = {N{rns_pkg::digit_t'(1)}};

  num_t          coef [TAPS];    // coef[j] multiplies x[n-j]
  num_t          hist [TAPS];    // hist[j] = x[n-j]
  num_t          acc, prod, sum;
  logic [TW-1:0] tap;            // tap in progress
  logic [CW-1:0] taps_left;

  residue_alu #(.N(N), .MODULI(MODULI), .OP(rns_pkg::RNS_MUL)) u_mult (
    .a (coef[tap]), .b (hist[tap]), .y (prod)
  );

  residue_alu #(.N(N), .MODULI(MODULI), .OP(rns_pkg::RNS_ADD)) u_add (
    .a (acc), .b (prod), .y (sum)
  );

  assign busy = (taps_left != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < TAPS; j++) coef[j] <= '0;
      coef[0] <= ONE;
    end else if (coef_shift && !busy) begin
      for (int j = TAPS - 1; j > 0; j--) coef[j] <= coef[j-1];
      coef[0] <= coef_in;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < TAPS; j++) hist[j] <= '0;
      acc       <= '0;
      y         <= '0;
      tap       <= '0;
      taps_left <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (busy) begin
        acc       <= sum;
        if (taps_left != CW'(1)) tap <= tap + 1'b1;
        taps_left <= taps_left - 1'b1;
        if (taps_left == CW'(1)) begin
          y         <= sum;
          out_valid <= 1'b1;
        end
      end else if (in_valid) begin
        for (int j = TAPS - 1; j > 0; j--) hist[j] <= hist[j-1];
        hist[0]   <= x;
        acc       <= '0;
        tap       <= '0;
        taps_left <= CW'(TAPS);
      end
    end
  end

  a_no_load_while_busy: assert property (@(posedge clk) disable iff (rst) busy |-> !coef_shift)
    else $error("linear_filter: coefficient shifted in during filtering");

endmodule
