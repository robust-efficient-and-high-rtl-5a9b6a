// ofka_mul4: 4-bit overlap-free Karatsuba binary polynomial multiplier.
//
// Multiplies two 4-bit polynomials over GF(2) and returns the 7-bit
// product, combinationally. This is the small multiplier whose behaviour is
// shown in simulation (for example a = 11, b = 8 gives c = 88), written out
// with the internal signal names that simulation shows:
//   a1, b1  even-order halves {a2,a0} and {b2,b0} of the operands
//   a2, b2  odd-order halves  {a3,a1} and {b3,b1}
//   d1, d2  the sums a1+a2 and b1+b2 (XOR)
//   y       a1*b1         (G0, 2-bit sub-multiplier)
//   z       a2*b2         (G2, 2-bit sub-multiplier)
//   d3      d1*d2         (G1, 2-bit sub-multiplier)
// Splitting, the three 2-bit sub-multiplications and the alignment form the
// first stage; the second stage forms the overlap term d3 - y - z (here
// `mid`) and interleaves it, on the odd powers of x, with y + x^2*z on the
// even powers. The 2-bit sub-multipliers are conventional (schoolbook).
// The names above and the three-product structure follow the document; the
// name `mid` for the recombined odd-power term is this design's own.
//
// Interface: a, b (4 bits) in; c (7 bits) out. No clock.
module ofka_mul4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [6:0] c
);

  logic [1:0] a1, a2, b1, b2, d1, d2;
  logic [2:0] y, z, d3, mid;
  logic [3:0] even;

  // Block I: splitting ...
  assign a1 = {a[2], a[0]};
  assign a2 = {a[3], a[1]};
  assign b1 = {b[2], b[0]};
  assign b2 = {b[3], b[1]};
  assign d1 = a1 ^ a2;
  assign d2 = b1 ^ b2;

  // ... and sub-multiplication.
  clmul_school #(.N(2)) u_y  (.a(a1), .b(b1), .c(y));
  clmul_school #(.N(2)) u_z  (.a(a2), .b(b2), .c(z));
  clmul_school #(.N(2)) u_d3 (.a(d1), .b(d2), .c(d3));

  // Block II: overlap term and non-overlapping alignment.
  assign mid  = d3 ^ y ^ z;
  assign even = {1'b0, y} ^ {z, 1'b0};
  assign c    = {even[3], mid[2], even[2], mid[1], even[1], mid[0], even[0]};

endmodule
