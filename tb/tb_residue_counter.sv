// tb_residue_counter: self-checking testbench for residue_counter.
// Steps the default modulo 11, 13, 15, 16 counter through two full sweeps
// (2 x 34320 clocks) and a modulo 15, 16 counter alongside, comparing every
// digit with the integer count taken modulo each modulus, and checking the
// at_zero / at_max decodes (the sweep length is the product of the moduli).
module tb_residue_counter;
  logic clk = 1'b0;
  logic rst, inc;
  logic [3:0][3:0] cnt4;
  logic [1:0][3:0] cnt2;
  logic z4, m4, z2, m2;
  int checks = 0, failures = 0;
  int unsigned c4, c2;
  int unsigned sweeps4;
  int mods4 [4] = '{11, 13, 15, 16};
  int mods2 [2] = '{15, 16};

  always #5 clk = ~clk;

  residue_counter dut4 (.clk, .rst, .inc, .count(cnt4), .at_zero(z4), .at_max(m4));
  residue_counter #(.N(2), .MODULI({8'd16, 8'd15})) dut2 (
    .clk, .rst, .inc, .count(cnt2), .at_zero(z2), .at_max(m2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s c4=%0d c2=%0d at %0t", what, c4, c2, $time);
    end
  endtask

  initial begin
    rst = 1'b1; inc = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    c4 = 0; c2 = 0; sweeps4 = 0;
    for (int cyc = 0; cyc < 2 * 34320 + 5; cyc++) begin
      bit ok4 = 1'b1, ok2 = 1'b1;
      for (int i = 0; i < 4; i++) if (cnt4[i] != 4'(c4 % mods4[i])) ok4 = 1'b0;
      for (int i = 0; i < 2; i++) if (cnt2[i] != 4'(c2 % mods2[i])) ok2 = 1'b0;
      check(ok4, "digits 11,13,15,16");
      check(ok2, "digits 15,16");
      check(z4 == (c4 == 0) && m4 == (c4 == 34319), "decode 4");
      check(z2 == (c2 == 0) && m2 == (c2 == 239), "decode 2");
      if (m4) sweeps4++;
      @(posedge clk); #1;
      c4 = (c4 + 1) % 34320;
      c2 = (c2 + 1) % 240;
    end
    check(sweeps4 == 2, "two full sweeps of 34320");
    // hold with inc low
    inc = 1'b0;
    begin
      logic [3:0][3:0] held_count;
      held_count = cnt4;
      repeat (3) @(posedge clk);
      #1 check(cnt4 == held_count, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
