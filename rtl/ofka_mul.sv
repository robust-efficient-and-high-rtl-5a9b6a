// ofka_mul: hybrid overlap-free Karatsuba binary polynomial multiplier
// (the overlap-free-based strategy, OBS).
//
// Computes the full 2N-1-bit product c(x) = a(x) * b(x) of two N-bit
// polynomials over GF(2), combinationally.
//
// How it works. Each operand is split by coefficient parity rather than
// into high and low halves:  A(x) = Ae(y) + x*Ao(y)  with y = x^2, where Ae
// holds the even-indexed and Ao the odd-indexed coefficients (likewise B).
// Three half-size products are formed by instances of this same module:
//     G0 = Ae*Be,  G1 = (Ae+Ao)*(Be+Bo),  G2 = Ao*Bo
// and the product is  A*B = (G0 + y*G2) + x*(G1 - G0 - G2).
// The first bracket only feeds even powers of x and the second only odd
// powers, so the two never overlap: recombination is pure wiring plus the
// XORs inside each bracket. That removes one XOR level per recursion step
// compared with the high/low Karatsuba split (2 instead of 3 XOR delays per
// level). After LEVELS such splits the recursion stops and the remaining
// small products are done with the conventional schoolbook multiplier
// (clmul_school), which needs fewer LUTs at small sizes.
//
// Odd widths: the even half gets ceil(W/2) coefficients and the odd half
// floor(W/2); all three sub-products of a level are built at the wider size,
// the odd half zero-extended (the unused top coefficient of G2 is constant
// zero and is removed by synthesis). With equal widths per level the tree is
// written without recursion: level l holds 3^l operand pairs of width
// W_l = ceil(W_{l-1}/2); the splitting pass runs down the levels, the leaves
// are conventional multipliers, and the recombination pass runs back up.
// The even/odd split, the three products, the recombination and the switch
// to the conventional method at the lower levels follow the document. The
// exact handling of odd widths and the LEVELS parameter (how many
// overlap-free levels before the switch) are this implementation's choices;
// the defaults reproduce the 233-bit example (four levels, down to 15 bits).
//
// Interface: a, b (N bits) in; c (2N-1 bits) out. No clock, no latency.
module ofka_mul
  import ofka_pkg::*;
#(
  parameter int unsigned N      = OBS_N_DEFAULT,
  parameter int unsigned LEVELS = OBS_LEVELS_DEFAULT
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-2:0] c
);

  if (LEVELS > 0 && leaf_len(N, LEVELS - 1) < 2) begin : g_bad
    $error("ofka_mul: LEVELS too large for N");
  end

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned W  = leaf_len(N, l);   // operand width at this level
    localparam int unsigned NN = 3 ** l;           // operand pairs at this level

    logic [W-1:0]   xa [NN];   // left operands
    logic [W-1:0]   xb [NN];   // right operands
    logic [2*W-2:0] p  [NN];   // their products

    // Splitting stage: operands come from the input or the level above.
    if (l == 0) begin : g_in
      assign xa[0] = a;
      assign xb[0] = b;
    end else begin : g_split
      localparam int unsigned WP = leaf_len(N, l - 1);
      for (genvar j = 0; j < NN / 3; j++) begin : g_node
        logic [W-1:0] ae, ao, be, bo;   // even / odd halves of the parent pair
        always_comb begin
          ae = '0; ao = '0; be = '0; bo = '0;
          for (int unsigned i = 0; i < W; i++) begin
            ae[i] = g_lvl[l-1].xa[j][2*i];
            be[i] = g_lvl[l-1].xb[j][2*i];
            if (2*i + 1 < WP) begin
              ao[i] = g_lvl[l-1].xa[j][2*i+1];
              bo[i] = g_lvl[l-1].xb[j][2*i+1];
            end
          end
        end
        assign xa[3*j]   = ae;        // G0 = Ae*Be
        assign xb[3*j]   = be;
        assign xa[3*j+1] = ae ^ ao;   // G1 = (Ae+Ao)*(Be+Bo)
        assign xb[3*j+1] = be ^ bo;
        assign xa[3*j+2] = ao;        // G2 = Ao*Bo
        assign xb[3*j+2] = bo;
      end
    end

    // Products: conventional multipliers at the lowest level, overlap-free
    // recombination of the level below everywhere else.
    if (l == LEVELS) begin : g_leaf
      for (genvar j = 0; j < NN; j++) begin : g_ca
        clmul_school #(.N(W)) u_ca (.a(xa[j]), .b(xb[j]), .c(p[j]));
      end
    end else begin : g_comb
      localparam int unsigned WC = leaf_len(N, l + 1);
      for (genvar j = 0; j < NN; j++) begin : g_node
        logic [2*WC-2:0] g0, g1, g2, mid;
        logic [2*WC-1:0] even;
        assign g0 = g_lvl[l+1].p[3*j];
        assign g1 = g_lvl[l+1].p[3*j+1];
        assign g2 = g_lvl[l+1].p[3*j+2];
        always_comb begin
          mid  = g1 ^ g0 ^ g2;                 // odd powers of x
          even = {1'b0, g0} ^ {g2, 1'b0};      // G0 + y*G2: even powers of x
          for (int unsigned k = 0; k < 2*W-1; k++) begin
            if (k % 2 == 0) p[j][k] = even[k/2];
            else            p[j][k] = mid[k/2];
          end
        end
      end
    end
  end

  assign c = g_lvl[0].p[0];

endmodule
