// obs_digit_serial_tb: checks the digit-serial multiplier.
//
// Three instances: the default (233-bit operands, two 117-bit digits, so
// four digit products), a 20-bit one with 7-bit digits (three digits, nine
// products, columns of one, two and three products), and a 16-bit one with
// 4-bit digits (four digits, sixteen products). Each runs corner and random
// operations, compares the product with the shift-and-XOR reference and
// checks that done arrives exactly K*K clocks after the start, with busy
// high in between. A start issued while busy must be ignored.
module obs_digit_serial_tb;
  import tb_ref_pkg::*;

  localparam int NI = 3;
  localparam int NW [NI] = '{233, 20, 16};
  localparam int DW [NI] = '{117, 7, 4};
  localparam int KK [NI] = '{2, 3, 4};

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  start [NI];
  vec_t  av [NI], bv [NI];
  prod_t cv [NI];
  logic  busy [NI], done [NI];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // Default parameters for the first instance.
  begin : g_def
    logic [464:0] c;
    obs_digit_serial dut (.clk, .rst_n, .start(start[0]), .a(av[0][232:0]),
      .b(bv[0][232:0]), .busy(busy[0]), .done(done[0]), .c(c));
    assign cv[0] = prod_t'(c);
  end

  for (genvar g = 1; g < NI; g++) begin : g_inst
    logic [2*NW[g]-2:0] c;
    obs_digit_serial #(.N(NW[g]), .D(DW[g]), .LEVELS(1)) dut (.clk, .rst_n,
      .start(start[g]), .a(av[g][NW[g]-1:0]), .b(bv[g][NW[g]-1:0]),
      .busy(busy[g]), .done(done[g]), .c(c));
    assign cv[g] = prod_t'(c);
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // One operation on instance g; optionally pokes start again mid-way.
  task automatic run(int g, vec_t a, vec_t b, bit poke);
    int cyc;
    vec_t a2;
    prod_t exp;
    av[g] = a; bv[g] = b;
    exp = clmul_ref(a, b, NW[g]);
    @(negedge clk); start[g] = 1'b1;
    @(negedge clk); start[g] = 1'b0;
    cyc = 0;   // clock edges since the one that took start
    while (!done[g] && cyc < 100) begin
      check(busy[g], $sformatf("busy inst %0d cycle %0d", g, cyc));
      if (poke && cyc == 2) begin
        a2 = rand_vec(NW[g]);
        av[g] = a2; start[g] = 1'b1;       // must be ignored
      end else begin
        start[g] = 1'b0;
      end
      @(negedge clk);
      cyc++;
    end
    start[g] = 1'b0;
    check(cyc == KK[g] * KK[g], $sformatf("latency inst %0d: %0d", g, cyc));
    check(!busy[g], $sformatf("busy low at done, inst %0d", g));
    check(cv[g] == exp, $sformatf("product inst %0d: got %0h expected %0h", g, cv[g], exp));
    @(negedge clk);
    check(!done[g], $sformatf("done is one pulse, inst %0d", g));
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < NI; g++) begin
      start[g] = 1'b0; av[g] = '0; bv[g] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < NI; g++) begin
      check(!busy[g] && !done[g], "idle after reset");
      run(g, {MAXW{1'b1}} & ((vec_t'(1) << NW[g]) - 1),
             {MAXW{1'b1}} & ((vec_t'(1) << NW[g]) - 1), 1'b0);
      run(g, vec_t'(1) << (NW[g] - 1), vec_t'(1) << (NW[g] - 1), 1'b0);
      run(g, '0, rand_vec(NW[g]), 1'b0);
      run(g, rand_vec(NW[g]), rand_vec(NW[g]), 1'b1);
      for (int t = 0; t < 100; t++) run(g, rand_vec(NW[g]), rand_vec(NW[g]), 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
