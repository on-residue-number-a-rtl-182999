// output_register: the D/A converter's output register.
//
// It holds the residue number to be turned into a voltage.  The number is
// written with `load`; it stays until the next write, so the equality
// comparator finds it once in every ramp sweep and the sample-and-hold is
// refreshed each sweep.  `pending` is high from a write until the first
// sample taken of that value (`sampled` from the equality comparator), so a
// producer can tell when the new value has reached the output.  The pending
// flag and the reset are this design's choices.
//
// Timing: q changes on the clock edge that samples load; pending falls on the
// edge that ends the cycle in which sampled is high, unless a new value is
// written on that edge.
module output_register #(
  parameter int N = rns_pkg::N_MOD
) (
  input  logic                                clk,
  input  logic                                rst,      // synchronous, active high
  input  logic                                load,     // write d
  input  logic [N-1:0][rns_pkg::DIGIT_W-1:0]  d,        // residue number to output
  input  logic                                sampled,  // the value in q was sampled
  output logic [N-1:0][rns_pkg::DIGIT_W-1:0]  q,        // held residue number
  output logic                                pending   // q written, not yet sampled
);

  always_ff @(posedge clk) begin
    if (rst) begin
      q       <= '0;
      pending <= 1'b0;
    end else begin
      if (load) q <= d;
      if (load)         pending <= 1'b1;
      else if (sampled) pending <= 1'b0;
    end
  end

endmodule
