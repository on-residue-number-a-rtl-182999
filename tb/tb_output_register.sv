// tb_output_register: self-checking testbench for output_register.
// Random writes and sample strobes; checks the held value and the pending
// flag (set by a write, cleared by the first sample, write wins on a tie).
module tb_output_register;
  logic clk = 1'b0;
  logic rst, load, sampled, pending;
  logic [3:0][3:0] d, q;
  logic [3:0][3:0] exp_q;
  logic exp_pending;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  output_register dut (.clk, .rst, .load, .d, .sampled, .q, .pending);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    rst = 1'b1; load = 1'b0; sampled = 1'b0; d = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    exp_q = '0; exp_pending = 1'b0;
    check(q == '0 && pending == 1'b0, "reset");
    for (int cyc = 0; cyc < 1000; cyc++) begin
      load = ($urandom_range(0, 5) == 0);
      sampled = ($urandom_range(0, 3) == 0);
      d = 16'($urandom);
      @(posedge clk); #1;
      if (load) begin exp_q = d; exp_pending = 1'b1; end
      else if (sampled) exp_pending = 1'b0;
      check(q == exp_q, "value");
      check(pending == exp_pending, "pending");
    end
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
