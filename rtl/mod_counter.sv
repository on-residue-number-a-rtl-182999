// mod_counter: modulo-M binary counter, one digit of the residue counter.
//
// On every clock edge with inc high the count steps M-1 -> 0 or q -> q+1.
// The count is a plain W-bit binary number in 0..M-1; `at_max` is high while
// it holds M-1, so that `at_max & inc` marks the step that wraps it to 0.
// A synchronous, active-high reset clears it.  This is the ordinary
// synchronous modulo counter the converters are built around; the reset and
// the at_max output are this design's choices.
//
// Timing: the count changes one clock after inc is sampled high; at_max is
// combinational from the count.
module mod_counter #(
  parameter int unsigned M = 16,            // modulus, 2..2**W
  parameter int unsigned W = 4              // counter width
) (
  input  logic         clk,
  input  logic         rst,                 // synchronous, active high
  input  logic         inc,                 // count enable
  output logic [W-1:0] q,                   // current count, 0..M-1
  output logic         at_max               // q == M-1
);

  localparam logic [W-1:0] QMAX = W'(M - 1);

  assign at_max = (q == QMAX);

  always_ff @(posedge clk) begin
    if (rst)          q <= '0;
    else if (inc)     q <= at_max ? '0 : q + 1'b1;
  end

  // the count never leaves 0..M-1
  a_in_range: assert property (@(posedge clk) disable iff (rst) q <= QMAX);

  initial begin
    assert (M >= 2 && M <= (2 ** W)) else $error("mod_counter: M must be in 2..2**W");
  end

endmodule
