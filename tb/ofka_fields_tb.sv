// ofka_fields_tb: the hybrid overlap-free multiplier at the other operand
// sizes that are evaluated for it: 93 bits and the NIST binary fields of
// 163, 283, 409 and 571 bits (233 is the default, covered elsewhere).
// Each instance uses four overlap-free levels (three for 93 bits) over
// schoolbook leaves and is compared with the shift-and-XOR reference on
// corner and random operands. Three more 233-bit instances move the level
// at which the schoolbook method takes over (one, two and three
// overlap-free levels; four is the default).
module ofka_fields_tb;
  import tb_ref_pkg::*;

  localparam int NI = 8;
  localparam int NW [NI] = '{93, 163, 283, 409, 571, 233, 233, 233};
  localparam int LV [NI] = '{3, 4, 4, 4, 4, 1, 2, 3};

  vec_t  av [NI], bv [NI];
  prod_t cv [NI];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NI; g++) begin : g_inst
    logic [2*NW[g]-2:0] c;
    ofka_mul #(.N(NW[g]), .LEVELS(LV[g])) dut (.a(av[g][NW[g]-1:0]), .b(bv[g][NW[g]-1:0]), .c(c));
    assign cv[g] = prod_t'(c);
  end

  task automatic run(vec_t a, vec_t b, string what);
    for (int g = 0; g < NI; g++) begin
      av[g] = a & ((vec_t'(1) << NW[g]) - 1);
      bv[g] = b & ((vec_t'(1) << NW[g]) - 1);
    end
    #1;
    for (int g = 0; g < NI; g++) begin
      checks++;
      if (cv[g] !== clmul_ref(av[g], bv[g], NW[g])) begin
        failures++;
        if (failures < 10) $display("FAIL %s N=%0d", what, NW[g]);
      end
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
    run({MAXW{1'b1}}, {MAXW{1'b1}}, "all ones");
    run(vec_t'(1), rand_vec(MAXW), "times one");
    for (int g = 0; g < NI; g++)
      run(vec_t'(1) << (NW[g] - 1), vec_t'(1) << (NW[g] - 1), "top terms");
    for (int t = 0; t < 100; t++) run(rand_vec(MAXW), rand_vec(MAXW), "random");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
