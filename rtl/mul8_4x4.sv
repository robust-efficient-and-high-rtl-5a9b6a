// mul8_4x4: 8x8 unsigned integer multiplier composed of four 4x4
// sub-multipliers.
//
// With the operands split into nibbles, a = {ah, al} and b = {bh, bl}, four
// 4x4 products are formed and added with shifts:
//   ac = ah*bh, bc = al*bh, ad = ah*bl, bd = al*bl
//   t1 = ac << 8, t2 = bd, psum = (ad + bc) << 4
//   c  = t1 + psum + t2
// The signal names and widths (ac, bc, ad, bd: 8 bits; t1, t2, c: 16 bits;
// psum: 13 bits) are the ones shown for the 8-bit result, and the shown
// case a = 34, b = 127 -> c = 4318 (ac = bc = 14, ad = bd = 30, t1 = 3584,
// psum = 704) is an integer product, so this block uses integer addition,
// unlike the GF(2) multipliers of the rest of the design. The assignment
// of ah/al and bh/bl to the four names is read from the shown values.
//
// Interface: a, b (8 bits) in; c (16 bits) out. No clock.
module mul8_4x4 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] c
);

  logic [7:0]  ac, bc, ad, bd;
  logic [15:0] t1, t2;
  logic [12:0] psum;

  mul4_int u_ac (.a(a[7:4]), .b(b[7:4]), .p(ac));
  mul4_int u_bc (.a(a[3:0]), .b(b[7:4]), .p(bc));
  mul4_int u_ad (.a(a[7:4]), .b(b[3:0]), .p(ad));
  mul4_int u_bd (.a(a[3:0]), .b(b[3:0]), .p(bd));

  assign t1   = {ac, 8'd0};
  assign t2   = {8'd0, bd};
  assign psum = 13'({1'b0, ad} + {1'b0, bc}) << 4;
  assign c    = t1 + 16'(psum) + t2;

endmodule
