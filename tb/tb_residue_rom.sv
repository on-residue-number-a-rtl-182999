// tb_residue_rom: self-checking testbench for residue_rom.
// Reads every address of the addition, subtraction and multiplication tables
// for moduli 11 and 16 (and the addition table for 13 and 15) with in-range
// digits and compares with integer arithmetic modulo m.
module tb_residue_rom;
  rns_pkg::digit_t a, b;
  rns_pkg::digit_t add11, sub11, mul11, add16, sub16, mul16, add13, mul15;
  int checks = 0, failures = 0;

  residue_rom #(.M(11), .OP(rns_pkg::RNS_ADD)) u_add11 (.a, .b, .y(add11));
  residue_rom #(.M(11), .OP(rns_pkg::RNS_SUB)) u_sub11 (.a, .b, .y(sub11));
  residue_rom #(.M(11), .OP(rns_pkg::RNS_MUL)) u_mul11 (.a, .b, .y(mul11));
  residue_rom                                  u_add16 (.a, .b, .y(add16));
  residue_rom #(.M(16), .OP(rns_pkg::RNS_SUB)) u_sub16 (.a, .b, .y(sub16));
  residue_rom #(.M(16), .OP(rns_pkg::RNS_MUL)) u_mul16 (.a, .b, .y(mul16));
  residue_rom #(.M(13), .OP(rns_pkg::RNS_ADD)) u_add13 (.a, .b, .y(add13));
  residue_rom #(.M(15), .OP(rns_pkg::RNS_MUL)) u_mul15 (.a, .b, .y(mul15));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%0d b=%0d", what, a, b);
    end
  endtask

  initial begin
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        a = 4'(x); b = 4'(y);
        #1;
        check(add16 == 4'((x + y) % 16), "add16");
        check(sub16 == 4'((x - y + 16) % 16), "sub16");
        check(mul16 == 4'((x * y) % 16), "mul16");
        if (x < 11 && y < 11) begin
          check(add11 == 4'((x + y) % 11), "add11");
          check(sub11 == 4'((x - y + 11) % 11), "sub11");
          check(mul11 == 4'((x * y) % 11), "mul11");
        end
        if (x < 13 && y < 13) check(add13 == 4'((x + y) % 13), "add13");
        if (x < 15 && y < 15) check(mul15 == 4'((x * y) % 15), "mul15");
      end
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
