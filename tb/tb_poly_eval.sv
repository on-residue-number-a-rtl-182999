// tb_poly_eval: self-checking testbench for poly_eval (default: degree 8,
// moduli 11, 13, 15, 16).
// Checks the identity polynomial left by reset, then loads random
// coefficients and evaluates random points, comparing with Horner's rule in
// integer arithmetic modulo 34320.  Each result must arrive ORDER+1 clocks
// after the start was taken (9 steps for the eighth-order polynomial), and
// back-to-back evaluations must reuse the circulated coefficients.
module tb_poly_eval;
  localparam int ORDER = 8;
  localparam longint P = 34320;
  logic clk = 1'b0;
  logic rst, coef_shift, start, busy, done;
  logic [3:0][3:0] coef_in, x, y;
  longint a [ORDER+1];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  poly_eval dut (.clk, .rst, .coef_shift, .coef_in, .start, .x, .busy, .done, .y);

  function automatic logic [3:0][3:0] enc(longint v);
    return {4'(v % 16), 4'(v % 15), 4'(v % 13), 4'(v % 11)};
  endfunction

  function automatic longint horner(longint xv);
    longint p = 0;
    for (int k = ORDER; k >= 0; k--) p = (a[k] + xv * p) % P;
    return p;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // start an evaluation, wait for done, check value and latency
  task automatic evaluate(input longint xv);
    int cycles;
    x = enc(xv); start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cycles = 0;
    while (!done && cycles < 100) begin
      @(posedge clk); #1;
      cycles++;
    end
    check(cycles == ORDER + 1, "latency ORDER+1 clocks");
    check(y == enc(horner(xv)), "polynomial value");
  endtask

  initial begin
    rst = 1'b1; coef_shift = 1'b0; start = 1'b0; coef_in = '0; x = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    // identity after reset
    for (int k = 0; k <= ORDER; k++) a[k] = 0;
    a[1] = 1;
    for (int k = 0; k < 5; k++) evaluate($urandom_range(0, P - 1));
    // load random coefficients, highest power first
    for (int set = 0; set < 20; set++) begin
      for (int k = 0; k <= ORDER; k++) a[k] = $urandom_range(0, P - 1);
      for (int k = ORDER; k >= 0; k--) begin
        coef_in = enc(a[k]); coef_shift = 1'b1;
        @(posedge clk); #1;
      end
      coef_shift = 1'b0;
      for (int k = 0; k < 10; k++) evaluate($urandom_range(0, P - 1));
    end
    // a start while busy is ignored
    x = enc(5); start = 1'b1;
    @(posedge clk); #1;
    x = enc(9);
    @(posedge clk); #1;
    start = 1'b0;
    while (!done) begin @(posedge clk); #1; end
    check(y == enc(horner(5)), "start ignored while busy");
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
