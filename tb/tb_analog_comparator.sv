// tb_analog_comparator: self-checking testbench for the comparator model.
// Random and edge-case voltage pairs; output must be high exactly when the
// + input is above the - input (plus offset, tested with 0 and 500 uV).
module tb_analog_comparator;
  rns_pkg::uvolt_t vp, vn;
  logic out0, out500;
  int checks = 0, failures = 0;

  analog_comparator                   dut0   (.vp_uv(vp), .vn_uv(vn), .out(out0));
  analog_comparator #(.OFFSET_UV(500)) dut500 (.vp_uv(vp), .vn_uv(vn), .out(out500));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s vp=%0d vn=%0d", what, vp, vn);
    end
  endtask

  initial begin
    for (int k = 0; k < 1000; k++) begin
      vn = $urandom_range(0, 34_319_000);
      case (k % 4)
        0: vp = vn;
        1: vp = vn + 1;
        2: vp = vn + 500;
        default: vp = $urandom_range(0, 34_319_000) - 1000;
      endcase
      #1;
      check(out0 == (longint'(vp) > longint'(vn)), "offset 0");
      check(out500 == (longint'(vp) > longint'(vn) + 500), "offset 500");
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
