// tb_input_register: self-checking testbench for input_register.
// A modulo 15, 16 counter (240 counts per sweep) and a 1 mV-per-count ramp
// are modelled in the testbench; the comparator output is computed from an
// input voltage that changes every sweep.  Each sweep must load exactly once,
// with the residues of ceil(vin / 1 mV), one clock after the ramp reaches
// the input; an input above the top of the ramp must give overrange and
// keep the previous value; a glitching comparator must not reload.
module tb_input_register;
  localparam int P = 240;
  logic clk = 1'b0;
  logic rst, at_zero, at_max, cmp, valid, overrange;
  logic [1:0][3:0] count, q;
  logic [1:0][3:0] exp_q;
  int checks = 0, failures = 0;
  int c, vin_uv, trip_at, nvalid, nover, nsweeps;

  always #5 clk = ~clk;

  input_register #(.N(2)) dut (.clk, .rst, .count, .at_zero, .at_max, .cmp, .q, .valid, .overrange);

  function automatic logic [1:0][3:0] enc(int v);
    return {4'(v % 16), 4'(v % 15)};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s vin=%0d c=%0d q=%h exp=%h", what, vin_uv, c, q, exp_q);
    end
  endtask

  always_comb begin
    count   = enc(c);
    at_zero = (c == 0);
    at_max  = (c == P - 1);
  end

  initial begin
    rst = 1'b1; c = 0; vin_uv = 0; cmp = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    exp_q = '0; nvalid = 0; nover = 0; nsweeps = 0;
    for (int s = 0; s < 60; s++) begin
      // new input for this sweep; every 7th sweep is above the ramp's top
      if (s % 7 == 6) vin_uv = (P - 1) * 1000 + 400;
      else            vin_uv = $urandom_range(0, (P - 1) * 1000);
      trip_at = (vin_uv + 999) / 1000;        // first count with ramp >= vin
      if (s % 7 == 6) trip_at = -1;
      for (c = 0; c < P; c++) begin
        // ramp = c mV; comparator high while input above ramp, with a
        // glitch back high two counts after the trip on some sweeps
        cmp = (vin_uv > c * 1000) || (s % 3 == 1 && trip_at >= 0 && c == trip_at + 2);
        @(posedge clk); #1;
        if (c == trip_at) exp_q = enc(trip_at);
        check(valid == (c == trip_at), "valid one clock after the trip");
        check(overrange == (trip_at < 0 && c == P - 1), "overrange");
        check(q == exp_q, "loaded value");
        if (valid) nvalid++;
        if (overrange) nover++;
      end
      c = 0;
      nsweeps++;
    end
    check(nvalid + nover == nsweeps, "one result per sweep");
    check(nover > 0, "overrange seen");
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
