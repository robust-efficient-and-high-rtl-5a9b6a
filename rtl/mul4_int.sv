// mul4_int: 4x4 unsigned integer multiplier, the sub-multiplier of the
// 8-bit design (mul8_4x4).
//
// The product is the sum of the four shifted partial products a & b[i],
// added with ordinary carries. The document shows only that the 8-bit
// design is composed of 4x4 products and that those products are exact in
// simulation; the partial-product adder written here is the simplest
// circuit that does that and is this design's choice.
//
// Interface: a, b (4 bits) in; p (8 bits) out. No clock.
module mul4_int (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);

  logic [7:0] pp [4];

  always_comb begin
    for (int i = 0; i < 4; i++) pp[i] = b[i] ? (8'(a) << i) : 8'd0;
    p = pp[0] + pp[1] + pp[2] + pp[3];
  end

endmodule
