// mul8_4x4_tb: checks the 8x8 integer multiplier built from 4x4 products.
//
// All 65536 operand pairs are compared with the integer product. The
// published simulation point a = 34, b = 127 -> c = 4318 is checked with
// its intermediate values ac = bc = 14, ad = bd = 30, t1 = 3584, t2 = 30
// and psum = 704.
module mul8_4x4_tb;

  logic [7:0]  a, b;
  logic [15:0] c;
  int checks = 0, failures = 0;

  mul8_4x4 dut (.a(a), .b(b), .c(c));

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j); #1;
        check(int'(c), i * j, $sformatf("%0d*%0d", i, j));
      end
    a = 8'd34; b = 8'd127; #1;
    check(int'(c),         4318, "c");
    check(int'(dut.ac),    14,   "ac");
    check(int'(dut.bc),    14,   "bc");
    check(int'(dut.ad),    30,   "ad");
    check(int'(dut.bd),    30,   "bd");
    check(int'(dut.t1),    3584, "t1");
    check(int'(dut.t2),    30,   "t2");
    check(int'(dut.psum),  704,  "psum");
    // Unequal nibbles tell ac/bc/ad/bd apart: a = 0x35, b = 0x72.
    a = 8'h35; b = 8'h72; #1;
    check(int'(dut.ac), 3 * 7, "ac = ah*bh");
    check(int'(dut.bc), 5 * 7, "bc = al*bh");
    check(int'(dut.ad), 3 * 2, "ad = ah*bl");
    check(int'(dut.bd), 5 * 2, "bd = al*bl");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
