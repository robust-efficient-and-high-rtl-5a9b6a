// ofka_mul4_tb: checks the 4-bit overlap-free Karatsuba multiplier.
//
// All 256 operand pairs are compared with the shift-and-XOR reference.
// The three published simulation points (a = 11, 8, 5 with b = 8, giving
// c = 88, 64, 40) are also checked, together with the operand halves and
// sub-products a1, a2, b1, b2, y and z that go with them.
module ofka_mul4_tb;
  import tb_ref_pkg::*;

  logic [3:0] a, b;
  logic [6:0] c;
  int checks = 0, failures = 0;

  ofka_mul4 dut (.a(a), .b(b), .c(c));

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Published points: a, b, c, a1, a2, b1, b2, y, z.
  localparam int PTS [3][9] = '{
    '{11, 8, 88, 1, 3, 0, 2, 0, 6},
    '{ 8, 8, 64, 0, 2, 0, 2, 0, 4},
    '{ 5, 8, 40, 3, 0, 0, 2, 0, 0}
  };

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j); #1;
        check(int'(c), int'(clmul_ref(vec_t'(a), vec_t'(b), 4)), $sformatf("%0d*%0d", i, j));
      end
    for (int p = 0; p < 3; p++) begin
      a = 4'(PTS[p][0]); b = 4'(PTS[p][1]); #1;
      check(int'(c),        PTS[p][2], "c");
      check(int'(dut.a1),   PTS[p][3], "a1");
      check(int'(dut.a2),   PTS[p][4], "a2");
      check(int'(dut.b1),   PTS[p][5], "b1");
      check(int'(dut.b2),   PTS[p][6], "b2");
      check(int'(dut.y),    PTS[p][7], "y");
      check(int'(dut.z),    PTS[p][8], "z");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
