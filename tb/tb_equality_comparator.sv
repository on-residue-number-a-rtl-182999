// tb_equality_comparator: self-checking testbench for equality_comparator.
// Exhaustive over all 240 x 240 pairs of modulo 15, 16 residue numbers, plus
// random 4-digit pairs that differ in a single bit.
module tb_equality_comparator;
  logic [3:0][3:0] a4, b4;
  logic [3:0] dm4;
  logic m4;
  logic [1:0][3:0] a2, b2;
  logic [1:0] dm2;
  logic m2;
  int checks = 0, failures = 0;

  equality_comparator              dut4 (.a(a4), .b(b4), .digit_match(dm4), .match(m4));
  equality_comparator #(.N(2))     dut2 (.a(a2), .b(b2), .digit_match(dm2), .match(m2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int x = 0; x < 240; x++) begin
      for (int y = 0; y < 240; y++) begin
        a2 = {4'(x % 16), 4'(x % 15)};
        b2 = {4'(y % 16), 4'(y % 15)};
        #1;
        check(m2 == (x == y), "2-digit match");
        check(dm2[0] == ((x % 15) == (y % 15)) && dm2[1] == ((x % 16) == (y % 16)), "digit match");
      end
    end
    for (int k = 0; k < 2000; k++) begin
      int bitpos;
      a4 = 16'($urandom);
      bitpos = $urandom_range(0, 15);
      b4 = a4;
      if (k % 2 == 1) b4[bitpos / 4][bitpos % 4] = ~b4[bitpos / 4][bitpos % 4];
      #1;
      check(m4 == (k % 2 == 0), "4-digit match");
      check(k % 2 == 0 || dm4[bitpos / 4] == 1'b0, "4-digit mismatch digit");
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
