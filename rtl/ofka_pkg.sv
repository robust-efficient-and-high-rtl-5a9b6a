// ofka_pkg: constants and helpers shared by the overlap-free Karatsuba
// multipliers.
//
// The default operand width is 233 bits, one of the five binary fields
// recommended for ECDSA (163, 233, 283, 409, 571), and the one the hybrid
// strategy is worked through with: four overlap-free levels take a 233-bit
// product down to 15-bit products (233 -> 117 -> 59 -> 30 -> 15), which are
// then done with the conventional (schoolbook) method.
//
// Width conventions used everywhere: an N-bit operand is a polynomial of
// degree N-1 over GF(2), bit i holding the coefficient of x^i. A product of
// two N-bit operands has 2N-1 coefficients. No reduction modulo a field
// polynomial is done; the multipliers return the full product.
package ofka_pkg;

  // Operand width of the main multiplier (NIST field size).
  localparam int unsigned OBS_N_DEFAULT      = 233;
  // Number of overlap-free split levels above the conventional multipliers.
  localparam int unsigned OBS_LEVELS_DEFAULT = 4;

  // Number of coefficients in the even-indexed half of an n-bit operand.
  function automatic int unsigned even_len(int unsigned n);
    return (n + 1) / 2;
  endfunction

  // Number of coefficients in the odd-indexed half of an n-bit operand.
  function automatic int unsigned odd_len(int unsigned n);
    return n / 2;
  endfunction

  // Width of the operand after `levels` overlap-free splits (even half is
  // the larger one, so this is the widest leaf multiplier).
  function automatic int unsigned leaf_len(int unsigned n, int unsigned levels);
    int unsigned w;
    w = n;
    for (int unsigned l = 0; l < levels; l++) w = (w + 1) / 2;
    return w;
  endfunction

endpackage
