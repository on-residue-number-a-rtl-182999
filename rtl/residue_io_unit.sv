// residue_io_unit: residue adder and multiplier attached to a microcomputer
// as an I/O device.
//
// The microcomputer writes the two operand registers A and B; their sum and
// their product, each formed digit by digit in lookup tables, can then be
// read at two input locations.  Programs that write operands and read
// results can so evaluate any expression of additions and multiplications
// (polynomials, linear filters, FFT butterflies) in residue form.  With the
// default moduli 15, 16 a residue number is 8 bits, one byte of the bus.
//
// Register map (addr): 0 = A (write; read back), 1 = B (write; read back),
// 2 = A + B (read), 3 = A x B (read).  The address map, the read-back of A and
// B and the reset of both registers to 0 are this design's choices.
//
// Timing: writes take effect on the clock edge with wr high; reads are
// combinational (one table access after A and B settle).
module residue_io_unit #(
  parameter int N = 2,
  parameter logic [N-1:0][7:0] MODULI = rns_pkg::MODULI_8BIT,
  localparam int DW = N * rns_pkg::DIGIT_W
) (
  input  logic          clk,
  input  logic          rst,     // synchronous, active high
  input  logic [1:0]    addr,    // register select
  input  logic          wr,      // write strobe
  input  logic [DW-1:0] wdata,   // residue number written
  output logic [DW-1:0] rdata    // residue number read
);

  typedef logic [N-1:0][rns_pkg::DIGIT_W-1:0] num_t;

  num_t reg_a, reg_b, sum, prod;

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_a <= '0;
      reg_b <= '0;
    end else if (wr) begin
      if (addr == 2'd0) reg_a <= wdata;
      if (addr == 2'd1) reg_b <= wdata;
    end
  end

  residue_alu #(.N(N), .MODULI(MODULI), .OP(rns_pkg::RNS_ADD)) u_add (
    .a (reg_a), .b (reg_b), .y (sum)
  );

  residue_alu #(.N(N), .MODULI(MODULI), .OP(rns_pkg::RNS_MUL)) u_mult (
    .a (reg_a), .b (reg_b), .y (prod)
  );

  always_comb begin
    unique case (addr)
      2'd0:    rdata = reg_a;
      2'd1:    rdata = reg_b;
      2'd2:    rdata = sum;
      default: rdata = prod;
    endcase
  end

endmodule
