// input_register: the A/D converter's input register.
//
// Once per ramp sweep it loads the residue counter at the moment the analog
// input becomes less than the ramp, so that it holds the residue digits of
// the input voltage in ramp steps (millivolts by default).  The comparator
// output `cmp` is high while the input is above the ramp.  The register is
// armed at the start of each sweep (counter at 0) and loads on the first
// cycle of the sweep in which `cmp` is low; it then stays disarmed until the
// next sweep, so comparator chatter cannot load it twice.  With a ramp of
// count * 1 mV the value loaded is the smallest count whose ramp voltage is
// not below the input, i.e. the input in millivolts rounded up.
//
// Interface: `valid` pulses for one cycle when q has been loaded; `overrange`
// pulses at the end of a sweep in which the input stayed above the ramp (q
// then keeps the previous conversion).  Reset clears q.  Loading from the
// comparator follows the block diagram; arming, the flags and the reset are
// this design's choices.
//
// Timing: one conversion per sweep of prod(MODULI) clocks; q and valid are
// registered, one clock after the cycle in which the ramp passed the input.
module input_register #(
  parameter int N = rns_pkg::N_MOD
) (
  input  logic                                clk,
  input  logic                                rst,        // synchronous, active high
  input  logic [N-1:0][rns_pkg::DIGIT_W-1:0]  count,      // residue counter
  input  logic                                at_zero,    // counter at 0: sweep starts
  input  logic                                at_max,     // counter at its last value
  input  logic                                cmp,        // comparator: input above ramp
  output logic [N-1:0][rns_pkg::DIGIT_W-1:0]  q,          // converted residue number
  output logic                                valid,      // q loaded this sweep (pulse)
  output logic                                overrange   // sweep ended with no load (pulse)
);

  logic armed;       // no load yet in this sweep
  logic armed_now;   // armed, counting the arming at the sweep start
  logic load;

  assign armed_now = armed | at_zero;
  assign load      = armed_now & ~cmp;

  always_ff @(posedge clk) begin
    if (rst) begin
      q         <= '0;
      armed     <= 1'b0;
      valid     <= 1'b0;
      overrange <= 1'b0;
    end else begin
      valid     <= load;
      overrange <= armed_now & cmp & at_max;
      if (load) q <= count;
      if (load)         armed <= 1'b0;
      else if (at_zero) armed <= 1'b1;
      else if (at_max)  armed <= 1'b0;
    end
  end

endmodule
