// clmul_school: conventional (schoolbook) carry-less multiplier over GF(2).
//
// Computes the full product c(x) = a(x) * b(x) of two N-bit binary
// polynomials: every coefficient c_k is the XOR of the N^2 partial products
// a_i & b_j with i + j = k. This is the "conventional approach" that the
// hybrid strategy uses at its lowest level, where it needs fewer LUTs than
// further Karatsuba splitting. The document names the method and its use;
// the partial-product array written here is the plain textbook form.
//
// Purely combinational: no clock, output valid a gate-depth after the
// inputs. c is 2N-1 bits wide.
module clmul_school #(
  parameter int unsigned N = 15
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-2:0] c
);

  always_comb begin
    c = '0;
    for (int unsigned i = 0; i < N; i++) begin
      for (int unsigned j = 0; j < N; j++) begin
        c[i+j] = c[i+j] ^ (a[i] & b[j]);
      end
    end
  end

endmodule
