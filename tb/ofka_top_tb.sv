// ofka_top_tb: end-to-end test of the whole design at its default sizes.
//
// Drives all four multipliers of the top level together: random 233-bit
// operand pairs go to both the combinational hybrid multiplier and the
// digit-serial one, whose products must agree with each other and with the
// shift-and-XOR reference; the 4-bit multiplier gets GF(2) operands and the
// 8-bit one integer operands. It also counts how often each mechanism of
// the design was used and fails if one never happened:
//   accum    - a digit product added to an unshifted accumulator (a column
//              of more than one digit product)
//   shift    - the >> d feedback at the start of a new column
//   emit     - a finished low digit taken by the overlap circuit
//   ignored  - a start request ignored because the multiplier was busy
//   carry8   - an 8-bit product where integer carries make the result
//              differ from the carry-less one
//   odd_mid  - a 233-bit product whose overlap term is non-zero at the top
//              level (the odd-power half actually carries data)
module ofka_top_tb;
  import tb_ref_pkg::*;

  localparam int N = 233;
  localparam int K = 2;           // digits per operand in the digit-serial unit

  logic           clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]   obs_a, obs_b, ds_a, ds_b;
  logic [2*N-2:0] obs_c, ds_c;
  logic           ds_start, ds_busy, ds_done;
  logic [3:0]     m4_a, m4_b;
  logic [6:0]     m4_c;
  logic [7:0]     m8_a, m8_b;
  logic [15:0]    m8_c;

  int checks = 0, failures = 0;
  int n_accum = 0, n_shift = 0, n_emit = 0, n_ignored = 0, n_carry8 = 0, n_odd = 0;

  always #5 clk = ~clk;

  ofka_top dut (.*);

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // Mechanism counters, sampled at every clock of the digit-serial unit.
  always @(posedge clk) begin
    if (dut.u_ds.busy) begin
      if (!dut.u_ds.first)                      n_accum++;
      if (dut.u_ds.first && dut.u_ds.col != 0)  n_shift++;
      if (dut.u_ds.last && !dut.u_ds.final_col) n_emit++;
      if (ds_start)                             n_ignored++;
    end
  end

  task automatic one_op(vec_t a, vec_t b, bit poke);
    prod_t exp;
    int cyc;
    a = a & ((vec_t'(1) << N) - 1);
    b = b & ((vec_t'(1) << N) - 1);
    exp = clmul_ref(a, b, N);
    obs_a = N'(a); obs_b = N'(b);
    ds_a  = N'(a); ds_b  = N'(b);
    @(negedge clk); ds_start = 1'b1;
    @(negedge clk); ds_start = poke;
    cyc = 0;
    while (!ds_done && cyc < 50) begin
      @(negedge clk);
      ds_start = 1'b0;
      cyc++;
    end
    check(cyc == K * K, $sformatf("digit-serial latency %0d", cyc));
    check(prod_t'(obs_c) == exp, "combinational 233-bit product");
    check(prod_t'(ds_c) == exp, "digit-serial 233-bit product");
    check(ds_c == obs_c, "both 233-bit multipliers agree");
    if (dut.u_obs.g_lvl[0].g_comb.g_node[0].mid != '0) n_odd++;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ds_start = 1'b0;
    obs_a = '0; obs_b = '0; ds_a = '0; ds_b = '0;
    m4_a = '0; m4_b = '0; m8_a = '0; m8_b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    one_op({MAXW{1'b1}}, {MAXW{1'b1}}, 1'b0);
    one_op(vec_t'(1) << (N - 1), rand_vec(N), 1'b1);
    for (int t = 0; t < 200; t++) begin
      one_op(rand_vec(N), rand_vec(N), t % 7 == 0);
      m4_a = 4'($urandom); m4_b = 4'($urandom);
      m8_a = 8'($urandom); m8_b = 8'($urandom);
      #1;
      check(prod_t'(m4_c) == clmul_ref(vec_t'(m4_a), vec_t'(m4_b), 4), "4-bit product");
      check(int'(m8_c) == int'(m8_a) * int'(m8_b), "8-bit product");
      if (prod_t'(m8_c) != clmul_ref(vec_t'(m8_a), vec_t'(m8_b), 8)) n_carry8++;
    end

    $display("mechanisms: accum=%0d shift=%0d emit=%0d ignored=%0d carry8=%0d odd_mid=%0d",
             n_accum, n_shift, n_emit, n_ignored, n_carry8, n_odd);
    check(n_accum   > 0, "accumulation never happened");
    check(n_shift   > 0, ">> d feedback never happened");
    check(n_emit    > 0, "digit emission never happened");
    check(n_ignored > 0, "start while busy never happened");
    check(n_carry8  > 0, "8-bit carry case never happened");
    check(n_odd     > 0, "odd-power overlap term never non-zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
