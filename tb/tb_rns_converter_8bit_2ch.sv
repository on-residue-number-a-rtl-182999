// tb_rns_converter_8bit_2ch: system test of rns_converter_system in its
// "eight bit" setting (moduli 15, 16: 240 counts, sweep of 240 clocks) with
// two A/D and two D/A channels sharing one counter and one ramp.
//
// Each sweep both inputs are converted (residues of ceil(vin / 1 mV)); both
// outputs are driven with different numbers and must hold them in
// millivolts.  Channel 1 also gets a correction polynomial y = x^2 + 1 and a
// pre-correction y = 5x + 2 while channel 0 keeps the identity, showing the
// channels are independent.  Conversions must come once per 240 clocks.
module tb_rns_converter_8bit_2ch;
  localparam int P = 240;

  logic clk = 1'b0;
  logic rst;
  rns_pkg::uvolt_t vin_uv [2];
  rns_pkg::uvolt_t vout_uv [2];
  logic [1:0][3:0] adc_data [2];
  logic [1:0] adc_valid, adc_overrange, adc_coef_shift;
  logic [1:0][3:0] adc_coef_in;
  logic [1:0][3:0] dac_data [2];
  logic [1:0] dac_valid, dac_ready, dac_pending, dac_coef_shift, dac_filt_shift;
  logic [1:0][3:0] dac_coef_in;
  logic [1:0] io_addr;
  logic io_wr;
  logic [7:0] io_wdata, io_rdata;

  int checks = 0, failures = 0;
  int n_conv [2], n_dac [2], n_corr = 0, n_pre = 0, n_rate = 0;

  always #5 clk = ~clk;

  rns_converter_system #(.N(2), .MODULI({8'd16, 8'd15}), .NUM_IN(2), .NUM_OUT(2)) dut (
    .clk, .rst, .vin_uv, .vout_uv,
    .adc_data, .adc_valid, .adc_overrange, .adc_coef_shift, .adc_coef_in,
    .dac_data, .dac_valid, .dac_ready, .dac_pending, .dac_coef_shift, .dac_filt_shift, .dac_coef_in,
    .io_addr, .io_wr, .io_wdata, .io_rdata
  );

  function automatic logic [1:0][3:0] enc(int v);
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

  // wait for a result on both channels (they may come in different clocks)
  task automatic wait_both(output logic [1:0][3:0] r0, output logic [1:0][3:0] r1, output int cycles);
    bit g0, g1;
    g0 = 0; g1 = 0; cycles = 0;
    while (!(g0 && g1) && cycles < 4 * P) begin
      if (adc_valid[0]) begin g0 = 1; r0 = adc_data[0]; end
      if (adc_valid[1]) begin g1 = 1; r1 = adc_data[1]; end
      tick();
      cycles++;
    end
  endtask

  initial begin
    logic [1:0][3:0] r0, r1;
    int cycles, c0, c1, v0, v1, d0, d1, start_cycle;
    n_conv = '{0, 0}; n_dac = '{0, 0};
    rst = 1'b1;
    vin_uv = '{0, 0}; adc_coef_shift = '0; adc_coef_in = '0;
    dac_data = '{'0, '0}; dac_valid = '0; dac_coef_shift = '0; dac_filt_shift = '0; dac_coef_in = '0;
    io_addr = '0; io_wr = 1'b0; io_wdata = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // channel 1: correction y = x^2 + 1, pre-correction y = 5x + 2; loaded
    // in the clocks after a conversion, when the corrector is idle
    while (!adc_valid[1]) tick();
    tick();
    for (int k = 8; k >= 0; k--) begin
      adc_coef_in = enc((k == 2) ? 1 : (k == 0) ? 1 : 0);
      dac_coef_in = enc((k == 1) ? 5 : (k == 0) ? 2 : 0);
      adc_coef_shift = 2'b10; dac_coef_shift = 2'b10;
      tick();
    end
    adc_coef_shift = '0; dac_coef_shift = '0;

    wait_both(r0, r1, cycles);
    for (int s = 0; s < 40; s++) begin
      v0 = $urandom_range(0, (P - 1) * 1000);
      v1 = $urandom_range(0, (P - 1) * 1000);
      vin_uv[0] = v0; vin_uv[1] = v1;
      wait_both(r0, r1, cycles);                 // sweep in progress
      start_cycle = 0;
      wait_both(r0, r1, cycles);
      c0 = (v0 + 999) / 1000;
      c1 = (v1 + 999) / 1000;
      check(r0 == enc(c0), "channel 0 conversion");
      check(r1 == enc((c1 * c1 + 1) % P), "channel 1 corrected conversion");
      check(cycles <= P + 1, "one conversion per 240-clock sweep");
      if (r0 == enc(c0)) n_conv[0]++;
      if (r1 == enc((c1 * c1 + 1) % P)) begin n_conv[1]++; n_corr++; end
      if (cycles <= P + 1) n_rate++;

      // both outputs
      d0 = $urandom_range(0, P - 1);
      d1 = $urandom_range(0, P - 1);
      while (dac_ready != 2'b11) tick();
      dac_data[0] = enc(d0); dac_data[1] = enc(d1); dac_valid = 2'b11;
      tick();
      dac_valid = '0;
      cycles = 0;
      while (dac_pending != 2'b11 && cycles < 100) begin tick(); cycles++; end
      cycles = 0;
      while (dac_pending != 2'b00 && cycles < 2 * P) begin tick(); cycles++; end
      check(cycles <= P, "outputs sampled within one sweep");
      tick();
      check(vout_uv[0] == d0 * 1000, "channel 0 output voltage");
      check(vout_uv[1] == ((5 * d1 + 2) % P) * 1000, "channel 1 pre-corrected output voltage");
      if (vout_uv[0] == d0 * 1000) n_dac[0]++;
      if (vout_uv[1] == ((5 * d1 + 2) % P) * 1000) begin n_dac[1]++; n_pre++; end
    end
    $display("mechanisms: conv0=%0d conv1=%0d corrected=%0d rate=%0d dac0=%0d dac1=%0d precorrected=%0d",
             n_conv[0], n_conv[1], n_corr, n_rate, n_dac[0], n_dac[1], n_pre);
    check(n_conv[0] > 0 && n_conv[1] > 0, "mechanism: two input channels");
    check(n_dac[0] > 0 && n_dac[1] > 0,   "mechanism: two output channels");
    check(n_corr > 0 && n_pre > 0,        "mechanism: per-channel correction");
    check(n_rate > 0,                     "mechanism: 240-clock sweep");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
