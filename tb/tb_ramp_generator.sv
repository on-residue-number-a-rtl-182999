// tb_ramp_generator: self-checking testbench for the ramp generator model.
// With a short sweep (STEPS = 240, the modulo 15, 16 case) it checks that the
// ramp rises one step of STEP_UV per increment, holds when not incremented,
// returns to 0 V on the increment with restart, and resets to 0 V.
module tb_ramp_generator;
  localparam int STEPS = 240;
  logic clk = 1'b0;
  logic rst, inc, restart;
  rns_pkg::uvolt_t ramp;
  int checks = 0, failures = 0;
  int level;

  always #5 clk = ~clk;

  ramp_generator #(.STEPS(STEPS), .STEP_UV(1000)) dut (
    .clk, .rst, .inc, .restart, .ramp_uv(ramp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s level=%0d ramp=%0d", what, level, ramp);
    end
  endtask

  initial begin
    rst = 1'b1; inc = 1'b0; restart = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    level = 0;
    for (int cyc = 0; cyc < 3 * STEPS; cyc++) begin
      check(ramp == level * 1000, "ramp voltage");
      inc = ($urandom_range(0, 4) != 0);
      restart = (level == STEPS - 1);
      @(posedge clk); #1;
      if (inc) level = (level == STEPS - 1) ? 0 : level + 1;
    end
    rst = 1'b1;
    @(posedge clk); #1;
    check(ramp == 0, "reset");
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
