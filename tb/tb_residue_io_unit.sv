// tb_residue_io_unit: self-checking testbench for residue_io_unit.
// Acts as the microcomputer: writes A and B over the bus, reads them back,
// then reads the sum and the product locations and compares with integer
// arithmetic modulo 240 (moduli 15, 16).  Finishes by evaluating a short
// polynomial with repeated bus operations, as a program would.
module tb_residue_io_unit;
  localparam int P = 240;
  logic clk = 1'b0;
  logic rst, wr;
  logic [1:0] addr;
  logic [7:0] wdata, rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  residue_io_unit dut (.clk, .rst, .addr, .wr, .wdata, .rdata);

  function automatic logic [7:0] enc(int v);
    return {4'(v % 16), 4'(v % 15)};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s rdata=%h", what, rdata);
    end
  endtask

  task automatic bus_write(input logic [1:0] a, input logic [7:0] d);
    addr = a; wdata = d; wr = 1'b1;
    @(posedge clk); #1;
    wr = 1'b0;
  endtask

  task automatic bus_read(input logic [1:0] a, output logic [7:0] d);
    addr = a;
    #1 d = rdata;
  endtask

  initial begin
    logic [7:0] r;
    int x, y, p;
    rst = 1'b1; wr = 1'b0; addr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    bus_read(2'd2, r);
    check(r == 8'h00, "sum after reset");
    for (int k = 0; k < 500; k++) begin
      x = $urandom_range(0, P - 1);
      y = $urandom_range(0, P - 1);
      bus_write(2'd0, enc(x));
      bus_write(2'd1, enc(y));
      bus_read(2'd0, r); check(r == enc(x), "read back A");
      bus_read(2'd1, r); check(r == enc(y), "read back B");
      bus_read(2'd2, r); check(r == enc((x + y) % P), "sum");
      bus_read(2'd3, r); check(r == enc((x * y) % P), "product");
    end
    // p = 3 x^2 + 5 x + 7 at x = 11 by Horner, p' = a + x * p
    x = 11;
    bus_write(2'd0, enc(x));
    bus_write(2'd1, enc(3));
    bus_read(2'd3, r);                 // 3 x
    bus_write(2'd0, r); bus_write(2'd1, enc(5));
    bus_read(2'd2, r);                 // 3 x + 5
    bus_write(2'd0, enc(x)); bus_write(2'd1, r);
    bus_read(2'd3, r);                 // (3 x + 5) x
    bus_write(2'd0, r); bus_write(2'd1, enc(7));
    bus_read(2'd2, r);
    p = (3 * x * x + 5 * x + 7) % P;
    check(r == enc(p), "polynomial by program");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
