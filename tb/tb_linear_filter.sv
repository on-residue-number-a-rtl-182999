// tb_linear_filter: self-checking testbench for linear_filter (default: 4
// taps, moduli 11, 13, 15, 16).
// Checks the pass-through filter left by reset, then loads random
// coefficients and feeds random samples, comparing each output with the
// convolution sum computed in integers modulo 34320, and checks that each
// result arrives TAPS clocks after its sample was taken.
module tb_linear_filter;
  localparam int TAPS = 4;
  localparam longint P = 34320;
  logic clk = 1'b0;
  logic rst, coef_shift, in_valid, busy, out_valid;
  logic [3:0][3:0] coef_in, x, y;
  longint c [TAPS];
  longint h [TAPS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  linear_filter dut (.clk, .rst, .coef_shift, .coef_in, .in_valid, .x, .busy, .out_valid, .y);

  function automatic logic [3:0][3:0] enc(longint v);
    return {4'(v % 16), 4'(v % 15), 4'(v % 13), 4'(v % 11)};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic feed(input longint xv);
    int cycles;
    longint acc;
    for (int j = TAPS - 1; j > 0; j--) h[j] = h[j-1];
    h[0] = xv;
    x = enc(xv); in_valid = 1'b1;
    @(posedge clk); #1;
    in_valid = 1'b0;
    cycles = 0;
    while (!out_valid && cycles < 100) begin
      @(posedge clk); #1;
      cycles++;
    end
    acc = 0;
    for (int j = 0; j < TAPS; j++) acc = (acc + c[j] * h[j]) % P;
    check(cycles == TAPS, "latency TAPS clocks");
    check(y == enc(acc), "filter output");
  endtask

  initial begin
    rst = 1'b1; coef_shift = 1'b0; in_valid = 1'b0; coef_in = '0; x = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int j = 0; j < TAPS; j++) begin c[j] = 0; h[j] = 0; end
    c[0] = 1;
    for (int k = 0; k < 6; k++) feed($urandom_range(0, P - 1));
    for (int set = 0; set < 20; set++) begin
      for (int j = 0; j < TAPS; j++) c[j] = $urandom_range(0, P - 1);
      for (int j = TAPS - 1; j >= 0; j--) begin
        coef_in = enc(c[j]); coef_shift = 1'b1;
        @(posedge clk); #1;
      end
      coef_shift = 1'b0;
      for (int k = 0; k < 12; k++) feed($urandom_range(0, P - 1));
    end
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
