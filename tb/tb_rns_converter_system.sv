// tb_rns_converter_system: end-to-end testbench of the whole converter system
// at its default parameters (moduli 11, 13, 15, 16, one input and one output
// channel, eighth-order correction polynomials, 4-tap output filter).
//
// Sequence:
//   1. A/D with the reset (identity) correction: inputs between 0 and the top
//      of the ramp; each result must be the residues of ceil(vin / 1 mV) and
//      arrive once per sweep of 34320 clocks.
//   2. An input above the ramp's top: overrange, no result.
//   3. A/D with a loaded correction polynomial y = 2x^2 + 7x + 5.
//   4. D/A with identity pre-correction and filter: the held output voltage
//      must equal the number in millivolts; dac_pending must clear within a
//      sweep.
//   5. D/A with a loaded pre-correction polynomial y = 3x + 11 and filter
//      y[n] = 2x[n] + x[n-1].
//   6. Loop-back: the D/A output voltage is converted by the A/D.
//   7. The microcomputer adder/multiplier: sums and products.
// Each of these mechanisms is counted; one that never happened is a failure.
module tb_rns_converter_system;
  localparam longint P = 34320;
  localparam int SWEEP = 34320;

  logic clk = 1'b0;
  logic rst;
  rns_pkg::uvolt_t vin_uv [1];
  rns_pkg::uvolt_t vout_uv [1];
  logic [3:0][3:0] adc_data [1];
  logic [0:0] adc_valid, adc_overrange, adc_coef_shift;
  logic [3:0][3:0] adc_coef_in;
  logic [3:0][3:0] dac_data [1];
  logic [0:0] dac_valid, dac_ready, dac_pending, dac_coef_shift, dac_filt_shift;
  logic [3:0][3:0] dac_coef_in;
  logic [1:0] io_addr;
  logic io_wr;
  logic [7:0] io_wdata, io_rdata;

  int checks = 0, failures = 0;
  int n_conv = 0, n_over = 0, n_corr = 0, n_dac = 0, n_precorr = 0, n_filt = 0;
  int n_loop = 0, n_io = 0, n_rate = 0;
  longint hist [4];          // D/A filter input history (after pre-correction)

  always #5 clk = ~clk;

  rns_converter_system dut (
    .clk, .rst, .vin_uv, .vout_uv,
    .adc_data, .adc_valid, .adc_overrange, .adc_coef_shift, .adc_coef_in,
    .dac_data, .dac_valid, .dac_ready, .dac_pending, .dac_coef_shift, .dac_filt_shift, .dac_coef_in,
    .io_addr, .io_wr, .io_wdata, .io_rdata
  );

  function automatic logic [3:0][3:0] enc(longint v);
    return {4'(v % 16), 4'(v % 15), 4'(v % 13), 4'(v % 11)};
  endfunction

  function automatic logic [7:0] enc8(int v);
    return {4'(v % 16), 4'(v % 15)};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic tick();
    @(posedge clk); #1;
  endtask

  // wait for the next A/D result; returns 1 for a result, 0 for overrange
  task automatic wait_adc(output bit got, output int cycles);
    cycles = 0;
    while (!adc_valid[0] && !adc_overrange[0] && cycles < 3 * SWEEP) begin
      tick();
      cycles++;
    end
    got = adc_valid[0];
    tick();
  endtask

  task automatic load_adc_coefs(input longint a [9]);
    for (int k = 8; k >= 0; k--) begin
      adc_coef_in = enc(a[k]); adc_coef_shift = 1'b1;
      tick();
    end
    adc_coef_shift = 1'b0;
  endtask

  // send one number through the D/A path; returns the number expected at the
  // output register (pre-correction a1*x+a0, then the filter c)
  task automatic dac_send(input longint v, input longint a1, input longint a0,
                          input longint c [4], output longint expect_v);
    longint pre, acc;
    int cycles;
    while (!dac_ready[0]) tick();
    dac_data[0] = enc(v); dac_valid = 1'b1;
    tick();
    dac_valid = 1'b0;
    pre = (a1 * v + a0) % P;
    for (int j = 3; j > 0; j--) hist[j] = hist[j-1];
    hist[0] = pre;
    acc = 0;
    for (int j = 0; j < 4; j++) acc = (acc + c[j] * hist[j]) % P;
    expect_v = acc;
    // wait until the output register has the value and it was sampled
    cycles = 0;
    while (!dac_pending[0] && cycles < 100) begin tick(); cycles++; end
    check(dac_pending[0], "output register loaded");
    cycles = 0;
    while (dac_pending[0] && cycles < 2 * SWEEP) begin tick(); cycles++; end
    check(!dac_pending[0] && cycles <= SWEEP, "sampled within one sweep");
    tick();
    check(vout_uv[0] == expect_v * 1000, "held output voltage");
    if (vout_uv[0] == expect_v * 1000) n_dac++;
  endtask

  initial begin
    bit got;
    int cycles;
    longint code, ident [9], corr [9], cid [4], cf [4], e;
    int vin;

    rst = 1'b1;
    vin_uv[0] = 0; adc_coef_shift = '0; adc_coef_in = '0;
    dac_data[0] = '0; dac_valid = '0; dac_coef_shift = '0; dac_filt_shift = '0; dac_coef_in = '0;
    io_addr = '0; io_wr = 1'b0; io_wdata = '0;
    for (int j = 0; j < 4; j++) hist[j] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // 1. A/D, identity correction
    wait_adc(got, cycles);                          // first sweep after reset
    for (int s = 0; s < 6; s++) begin
      vin = (s == 0) ? 0 : (s == 1) ? (SWEEP - 1) * 1000 : $urandom_range(1, (SWEEP - 1) * 1000);
      vin_uv[0] = vin;
      wait_adc(got, cycles);                        // finish the sweep in progress
      wait_adc(got, cycles);
      code = (longint'(vin) + 999) / 1000;
      check(got && adc_data[0] == enc(code), "A/D conversion, identity correction");
      check(cycles > SWEEP - 100 && cycles <= SWEEP, "one conversion per sweep");
      if (got) n_conv++;
      if (cycles > SWEEP - 100 && cycles <= SWEEP) n_rate++;
    end

    // 2. overrange
    vin_uv[0] = SWEEP * 1000 + 500;
    wait_adc(got, cycles);
    wait_adc(got, cycles);
    check(!got, "overrange reported");
    if (!got) n_over++;

    // 3. A/D with correction y = 2x^2 + 7x + 5
    for (int k = 0; k < 9; k++) corr[k] = 0;
    corr[2] = 2; corr[1] = 7; corr[0] = 5;
    load_adc_coefs(corr);
    for (int s = 0; s < 4; s++) begin
      vin = $urandom_range(0, (SWEEP - 1) * 1000);
      vin_uv[0] = vin;
      wait_adc(got, cycles);
      wait_adc(got, cycles);
      code = (longint'(vin) + 999) / 1000;
      e = (2 * code * code + 7 * code + 5) % P;
      check(got && adc_data[0] == enc(e), "A/D with correction polynomial");
      if (got && adc_data[0] == enc(e)) n_corr++;
    end
    for (int k = 0; k < 9; k++) ident[k] = 0;
    ident[1] = 1;
    load_adc_coefs(ident);

    // 4. D/A, identity pre-correction and filter
    cid = '{1, 0, 0, 0};
    dac_send(0, 1, 0, cid, e);
    dac_send(P - 1, 1, 0, cid, e);
    for (int k = 0; k < 3; k++) dac_send($urandom_range(0, P - 1), 1, 0, cid, e);

    // 5. D/A with pre-correction y = 3x + 11 and filter 2x[n] + x[n-1]
    for (int k = 8; k >= 0; k--) begin
      dac_coef_in = enc((k == 1) ? 3 : (k == 0) ? 11 : 0); dac_coef_shift = 1'b1;
      tick();
    end
    dac_coef_shift = 1'b0;
    cf = '{2, 1, 0, 0};
    for (int j = 3; j >= 0; j--) begin
      dac_coef_in = enc(cf[j]); dac_filt_shift = 1'b1;
      tick();
    end
    dac_filt_shift = 1'b0;
    for (int k = 0; k < 4; k++) begin
      int n_dac_prev;
      n_dac_prev = n_dac;
      dac_send($urandom_range(0, P - 1), 3, 11, cf, e);
      if (n_dac > n_dac_prev) begin n_precorr++; n_filt++; end
    end

    // 6. loop-back: convert the D/A output with the A/D (identity correction)
    for (int k = 0; k < 3; k++) begin
      vin_uv[0] = vout_uv[0];
      code = vout_uv[0] / 1000;
      wait_adc(got, cycles);
      wait_adc(got, cycles);
      check(got && adc_data[0] == enc(code), "loop-back D/A -> A/D");
      if (got && adc_data[0] == enc(code)) n_loop++;
      dac_send($urandom_range(0, P - 1), 3, 11, cf, e);
    end

    // 7. microcomputer adder / multiplier
    for (int k = 0; k < 50; k++) begin
      int x, y;
      x = $urandom_range(0, 239); y = $urandom_range(0, 239);
      io_addr = 2'd0; io_wdata = enc8(x); io_wr = 1'b1; tick();
      io_addr = 2'd1; io_wdata = enc8(y); tick();
      io_wr = 1'b0;
      io_addr = 2'd2; #1 check(io_rdata == enc8((x + y) % 240), "I/O sum");
      io_addr = 2'd3; #1 check(io_rdata == enc8((x * y) % 240), "I/O product");
      if (io_rdata == enc8((x * y) % 240)) n_io++;
    end

    $display("mechanisms: conversions=%0d per-sweep-rate=%0d overrange=%0d corrected=%0d dac_samples=%0d precorrected=%0d filtered=%0d loopback=%0d io=%0d",
             n_conv, n_rate, n_over, n_corr, n_dac, n_precorr, n_filt, n_loop, n_io);
    check(n_conv > 0,    "mechanism: A/D conversion");
    check(n_rate > 0,    "mechanism: one conversion per sweep");
    check(n_over > 0,    "mechanism: overrange");
    check(n_corr > 0,    "mechanism: A/D correction polynomial");
    check(n_dac > 0,     "mechanism: D/A sample and hold");
    check(n_precorr > 0, "mechanism: D/A pre-correction polynomial");
    check(n_filt > 0,    "mechanism: D/A linear filter");
    check(n_loop > 0,    "mechanism: loop-back");
    check(n_io > 0,      "mechanism: microcomputer I/O unit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #60_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
