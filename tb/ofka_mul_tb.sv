// ofka_mul_tb: checks the hybrid overlap-free Karatsuba multiplier against
// the shift-and-XOR reference.
//
// The default instance (233 bits, four overlap-free levels over 15-bit
// conventional multipliers) gets corner and random operands; smaller
// instances cover even and odd widths, every recursion depth from zero
// levels (pure conventional) upwards, and 8 bits exhaustively along the
// low-weight corner patterns.
module ofka_mul_tb;
  import tb_ref_pkg::*;

  localparam int N0 = 233;                 // default instance
  localparam int NW [5] = '{8, 17, 163, 4, 9};
  localparam int LV [5] = '{2, 3, 4, 1, 0};

  logic [N0-1:0]   a0, b0;
  logic [2*N0-2:0] c0;
  vec_t            av [5], bv [5];
  prod_t           cv [5];
  int checks = 0, failures = 0;

  ofka_mul dut0 (.a(a0), .b(b0), .c(c0));

  for (genvar g = 0; g < 5; g++) begin : g_inst
    logic [NW[g]-1:0]   a, b;
    logic [2*NW[g]-2:0] c;
    assign a = av[g][NW[g]-1:0];
    assign b = bv[g][NW[g]-1:0];
    ofka_mul #(.N(NW[g]), .LEVELS(LV[g])) dut (.a(a), .b(b), .c(c));
    assign cv[g] = prod_t'(c);
  end

  task automatic check(prod_t got, prod_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic run0(vec_t a, vec_t b, string what);
    a0 = N0'(a); b0 = N0'(b); #1;
    check(prod_t'(c0), clmul_ref(vec_t'(a0), vec_t'(b0), N0), what);
  endtask

  task automatic run_small(vec_t a, vec_t b, string what);
    for (int g = 0; g < 5; g++) begin
      av[g] = a & ((vec_t'(1) << NW[g]) - 1);
      bv[g] = b & ((vec_t'(1) << NW[g]) - 1);
    end
    #1;
    for (int g = 0; g < 5; g++)
      check(cv[g], clmul_ref(av[g], bv[g], NW[g]), $sformatf("%s N=%0d", what, NW[g]));
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run0('0, rand_vec(N0), "zero");
    run0(rand_vec(N0), vec_t'(1), "times one");
    run0({MAXW{1'b1}}, {MAXW{1'b1}}, "all ones");
    for (int i = 0; i < N0; i += 13)
      run0(vec_t'(1) << i, rand_vec(N0), "single term");
    for (int t = 0; t < 300; t++) run0(rand_vec(N0), rand_vec(N0), "random");

    run_small({MAXW{1'b1}}, {MAXW{1'b1}}, "all ones");
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 8; j++)
        run_small(vec_t'(i), vec_t'(1) << j | vec_t'(8'hA5 >> j), "pattern");
    for (int t = 0; t < 300; t++) run_small(rand_vec(MAXW), rand_vec(MAXW), "random");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
