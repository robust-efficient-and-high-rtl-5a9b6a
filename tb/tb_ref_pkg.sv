// tb_ref_pkg: reference models for the multiplier testbenches.
//
// clmul_ref computes a carry-less (GF(2) polynomial) product by the
// shift-and-XOR method: for every set bit j of b, a shifted left by j is
// XORed into the result. This is deliberately a different formulation from
// both the partial-product array and the Karatsuba trees of the design.
// rand_vec returns a random n-bit vector built from 32-bit $urandom words.
package tb_ref_pkg;

  localparam int MAXW = 576;

  typedef logic [MAXW-1:0]   vec_t;
  typedef logic [2*MAXW-1:0] prod_t;

  function automatic prod_t clmul_ref(vec_t a, vec_t b, int n);
    prod_t r;
    r = '0;
    for (int j = 0; j < n; j++)
      if (b[j]) r = r ^ (prod_t'(a) << j);
    return r;
  endfunction

  function automatic vec_t rand_vec(int n);
    vec_t v;
    for (int w = 0; w < MAXW / 32; w++) v[w*32 +: 32] = $urandom;
    for (int i = n; i < MAXW; i++) v[i] = 1'b0;
    return v;
  endfunction

endpackage
