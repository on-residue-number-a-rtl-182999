// tb_mod_counter: self-checking testbench for mod_counter.
// Runs a modulo-11 and a modulo-16 counter (the smallest and largest digit
// counters of the converter) side by side with a random increment enable and
// compares count and at_max, cycle by cycle, against an integer model.
module tb_mod_counter;
  logic clk = 1'b0;
  logic rst;
  logic inc;
  logic [3:0] q11, q16;
  logic max11, max16;
  int checks = 0, failures = 0;
  int ref11, ref16;

  always #5 clk = ~clk;

  mod_counter #(.M(11), .W(4)) dut11 (.clk, .rst, .inc, .q(q11), .at_max(max11));
  mod_counter                  dut16 (.clk, .rst, .inc, .q(q16), .at_max(max16));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    rst = 1'b1; inc = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    ref11 = 0; ref16 = 0;
    for (int cyc = 0; cyc < 500; cyc++) begin
      check(q11 == 4'(ref11) && q16 == 4'(ref16), "count");
      check(max11 == (ref11 == 10) && max16 == (ref16 == 15), "at_max");
      inc = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (inc) begin
        ref11 = (ref11 + 1) % 11;
        ref16 = (ref16 + 1) % 16;
      end
      #1;
    end
    // synchronous reset
    rst = 1'b1; inc = 1'b1;
    @(posedge clk); #1;
    check(q11 == 0 && q16 == 0, "reset");
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
