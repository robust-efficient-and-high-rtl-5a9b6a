// obs_digit_serial: digit-serial binary polynomial multiplier built around
// one half-size overlap-free Karatsuba multiplier.
//
// Computes the full 2N-1-bit product c = a * b over GF(2) of two N-bit
// operands, one digit product per clock. Both operands are cut into
// K = ceil(N/D) digits of D bits (D defaults to ceil(N/2), so the
// multiplier sees (n/2)-bit inputs and K = 2). The digit products are taken
// column by column (product scanning): column k holds every pair
// (a_i, b_j) with i + j = k. The datapath is a chain of
//   multiplier  - ofka_mul, D x D bits -> 2D-1 bits
//   adder       - XOR of the new digit product with the feedback
//   register    - the 2D-1-bit accumulator `acc`
//   overlap circuit - takes the finished low D bits of a column (no later
//                 digit product overlaps them) into the result register,
//                 and at the last column the whole accumulator
// with a feedback path shifted right by d = D: at the first product of a
// new column the accumulator's low, already emitted, digit is dropped and
// the remaining bits carry into the column.
// The four stages, the (n/2)-bit multiplier inputs and the ">> d" feedback
// follow the document's block diagram. The column ordering of the digit
// products, the control FSM, the start/busy/done handshake and the result
// register are this design's own choices; the diagram does not give them.
//
// Interface and timing: assert `start` for one clock with `a` and `b` valid
// while `busy` is low. `busy` is high for the K*K clocks that follow, one
// digit product per clock; in the clock after those, `busy` is low and
// `done` pulses high for one cycle, so done is seen K*K clock edges after
// the edge that took `start`. `c` then holds the product until the next
// start is taken (a new operation overwrites it digit by digit). A start while busy is
// ignored. rst_n is an asynchronous, active-low reset.
module obs_digit_serial
  import ofka_pkg::*;
#(
  parameter int unsigned N      = OBS_N_DEFAULT,
  parameter int unsigned D      = even_len(N),
  parameter int unsigned LEVELS = OBS_LEVELS_DEFAULT - 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           busy,
  output logic           done,
  output logic [2*N-2:0] c
);

  localparam int unsigned K    = (N + D - 1) / D;     // digits per operand
  localparam int unsigned NCOL = 2 * K - 1;           // product columns
  localparam int unsigned CW   = $clog2(2 * K);       // column / digit counter width
  localparam int unsigned PW   = 2 * K * D - 1;       // padded product width

  typedef enum logic {S_IDLE, S_RUN} state_t;

  state_t              state;
  logic [K*D-1:0]      a_q, b_q;     // operands, zero-padded to K digits
  logic [CW-1:0]       col, idx;     // current column and a-digit index
  logic [2*D-2:0]      acc;          // register
  logic [PW-1:0]       res;          // overlap circuit output register
  logic                done_q;

  logic [D-1:0]        da, db;       // digits entering the multiplier
  logic [2*D-2:0]      prod;         // multiplier output
  logic [2*D-2:0]      fb;           // feedback into the adder
  logic [2*D-2:0]      sum;          // adder output
  logic [CW-1:0]       lo, hi;       // first and last a-digit of this column
  logic                first, last, final_col;

  // Column bounds: i runs from max(0, k-K+1) to min(k, K-1).
  always_comb begin
    lo        = (col >= CW'(K)) ? CW'(col - CW'(K - 1)) : '0;
    hi        = (col >= CW'(K)) ? CW'(K - 1) : col;
    first     = (idx == lo);
    last      = (idx == hi);
    final_col = (col == CW'(NCOL - 1));
  end

  // Digit selection, multiplier, adder with the >> d feedback.
  assign da = a_q[idx * D +: D];
  assign db = b_q[CW'(col - idx) * D +: D];

  ofka_mul #(.N(D), .LEVELS(LEVELS)) u_mul (.a(da), .b(db), .c(prod));

  assign fb  = first ? (acc >> D) : acc;
  assign sum = prod ^ fb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      a_q    <= '0;
      b_q    <= '0;
      col    <= '0;
      idx    <= '0;
      acc    <= '0;
      res    <= '0;
      done_q <= 1'b0;
    end else begin
      done_q <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            a_q   <= (K*D)'(a);
            b_q   <= (K*D)'(b);
            col   <= '0;
            idx   <= '0;
            acc   <= '0;
            state <= S_RUN;
          end
        end
        S_RUN: begin
          acc <= sum;
          if (last) begin
            // Overlap circuit: the column's low digit is final.
            if (final_col) begin
              res[PW-1 -: 2*D-1] <= sum;
              done_q             <= 1'b1;
              state              <= S_IDLE;
            end else begin
              res[col * D +: D] <= sum[D-1:0];
              col <= col + 1'b1;
              idx <= (col + 1'b1 >= CW'(K)) ? CW'(col + 1'b1 - CW'(K - 1)) : '0;
            end
          end else begin
            idx <= idx + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state == S_RUN);
  assign done = done_q;
  assign c    = res[2*N-2:0];

  // The padded product's top bits are always zero for N-bit operands.
  if (PW > 2*N - 1) begin : g_pad_check
    a_pad_zero: assert property (@(posedge clk) disable iff (!rst_n)
                                 done_q |-> (res[PW-1:2*N-1] == '0))
      else $error("obs_digit_serial: non-zero bits above the product");
  end

endmodule
