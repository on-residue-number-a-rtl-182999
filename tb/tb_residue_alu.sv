// tb_residue_alu: self-checking testbench for residue_alu.
// Random integers below 34320 are encoded in the moduli 11, 13, 15, 16; the
// adder, subtractor and multiplier outputs must be the encodings of
// (x + y), (x - y) and (x * y) modulo 34320.  The "eight bit" 15, 16 adder
// and multiplier are checked exhaustively against results modulo 240.
module tb_residue_alu;
  localparam int P4 = 34320;
  localparam int P2 = 240;
  logic [3:0][3:0] a4, b4, sum4, dif4, prd4;
  logic [1:0][3:0] a2, b2, sum2, prd2;
  int checks = 0, failures = 0;

  residue_alu                           u_add (.a(a4), .b(b4), .y(sum4));
  residue_alu #(.OP(rns_pkg::RNS_SUB))  u_sub (.a(a4), .b(b4), .y(dif4));
  residue_alu #(.OP(rns_pkg::RNS_MUL))  u_mul (.a(a4), .b(b4), .y(prd4));
  residue_alu #(.N(2), .MODULI({8'd16, 8'd15}))                       u_add2 (.a(a2), .b(b2), .y(sum2));
  residue_alu #(.N(2), .MODULI({8'd16, 8'd15}), .OP(rns_pkg::RNS_MUL)) u_mul2 (.a(a2), .b(b2), .y(prd2));

  function automatic logic [3:0][3:0] enc4(longint v);
    return {4'(v % 16), 4'(v % 15), 4'(v % 13), 4'(v % 11)};
  endfunction
  function automatic logic [1:0][3:0] enc2(int v);
    return {4'(v % 16), 4'(v % 15)};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int k = 0; k < 3000; k++) begin
      longint x, y;
      x = $urandom_range(0, P4 - 1);
      y = $urandom_range(0, P4 - 1);
      a4 = enc4(x); b4 = enc4(y);
      #1;
      check(sum4 == enc4((x + y) % P4), "add 15-bit");
      check(dif4 == enc4((x - y + P4) % P4), "sub 15-bit");
      check(prd4 == enc4((x * y) % P4), "mul 15-bit");
    end
    for (int x = 0; x < P2; x++) begin
      for (int y = 0; y < P2; y++) begin
        a2 = enc2(x); b2 = enc2(y);
        #1;
        check(sum2 == enc2((x + y) % P2), "add 8-bit");
        check(prd2 == enc2((x * y) % P2), "mul 8-bit");
      end
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
