// clmul_school_tb: checks the conventional carry-less multiplier against
// the shift-and-XOR reference, exhaustively at 4 bits and with random and
// corner operands at the default width (15 bits) and at 1 bit.
module clmul_school_tb;
  import tb_ref_pkg::*;

  localparam int N = 15;

  logic [N-1:0]   a, b;
  logic [2*N-2:0] c;
  logic [3:0]     a4, b4;
  logic [6:0]     c4;
  logic [0:0]     a1, b1, c1;
  int checks = 0, failures = 0;

  clmul_school          dut   (.a(a),  .b(b),  .c(c));
  clmul_school #(.N(4)) dut4  (.a(a4), .b(b4), .c(c4));
  clmul_school #(.N(1)) dut1  (.a(a1), .b(b1), .c(c1));

  task automatic check(prod_t got, prod_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
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
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j); #1;
        check(prod_t'(c4), clmul_ref(vec_t'(a4), vec_t'(b4), 4), "4-bit");
      end
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        a1 = 1'(i); b1 = 1'(j); #1;
        check(prod_t'(c1), clmul_ref(vec_t'(a1), vec_t'(b1), 1), "1-bit");
      end
    a = '1; b = '1; #1;
    check(prod_t'(c), clmul_ref(vec_t'(a), vec_t'(b), N), "all ones");
    a = '1; b = N'(1) << (N-1); #1;
    check(prod_t'(c), clmul_ref(vec_t'(a), vec_t'(b), N), "times x^(N-1)");
    for (int t = 0; t < 500; t++) begin
      a = N'(rand_vec(N)); b = N'(rand_vec(N)); #1;
      check(prod_t'(c), clmul_ref(vec_t'(a), vec_t'(b), N), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
