// tb_sample_hold: self-checking testbench for the sample-and-hold model.
// A ramp-like input changes every clock; the output must take the input of
// each cycle with sample high and hold it while sample is low.
module tb_sample_hold;
  logic clk = 1'b0;
  logic rst, sample;
  rns_pkg::uvolt_t vin, vout;
  int checks = 0, failures = 0;
  int expected;

  always #5 clk = ~clk;

  sample_hold dut (.clk, .rst, .sample, .vin_uv(vin), .vout_uv(vout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s vout=%0d expected=%0d", what, vout, expected);
    end
  endtask

  initial begin
    rst = 1'b1; sample = 1'b0; vin = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    expected = 0;
    for (int cyc = 0; cyc < 400; cyc++) begin
      vin = cyc * 1000 + 7;
      sample = ($urandom_range(0, 9) == 0);
      @(posedge clk); #1;
      if (sample) expected = cyc * 1000 + 7;
      check(vout == expected, "held value");
    end
    rst = 1'b1;
    @(posedge clk); #1;
    expected = 0;
    check(vout == 0, "reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
