// ofka_top: the overlap-free Karatsuba multiplier family side by side.
//
// Four independent multipliers with their own ports:
//   obs_*  the main N-bit hybrid overlap-free Karatsuba multiplier
//          (ofka_mul, default 233 bits, four overlap-free levels over
//          15-bit conventional multipliers); combinational.
//   ds_*   the digit-serial multiplier (obs_digit_serial) that reuses one
//          (n/2)-bit overlap-free multiplier over K*K clocks; clocked, with
//          a start/busy/done handshake.
//   m4_*   the 4-bit overlap-free Karatsuba multiplier (ofka_mul4).
//   m8_*   the 8-bit integer multiplier made of four 4x4 products
//          (mul8_4x4).
// The GF(2) multipliers return the unreduced 2N-1-bit polynomial product;
// reduction modulo a field polynomial is not part of this design. LEVELS
// must be at least 1, since the digit-serial unit uses LEVELS-1. The
// grouping into one top is this design's choice; the blocks do not share
// signals.
module ofka_top
  import ofka_pkg::*;
#(
  parameter int unsigned N      = OBS_N_DEFAULT,
  parameter int unsigned LEVELS = OBS_LEVELS_DEFAULT
) (
  input  logic           clk,
  input  logic           rst_n,
  // combinational hybrid multiplier
  input  logic [N-1:0]   obs_a,
  input  logic [N-1:0]   obs_b,
  output logic [2*N-2:0] obs_c,
  // digit-serial multiplier
  input  logic           ds_start,
  input  logic [N-1:0]   ds_a,
  input  logic [N-1:0]   ds_b,
  output logic           ds_busy,
  output logic           ds_done,
  output logic [2*N-2:0] ds_c,
  // 4-bit overlap-free multiplier
  input  logic [3:0]     m4_a,
  input  logic [3:0]     m4_b,
  output logic [6:0]     m4_c,
  // 8-bit integer multiplier
  input  logic [7:0]     m8_a,
  input  logic [7:0]     m8_b,
  output logic [15:0]    m8_c
);

  ofka_mul #(.N(N), .LEVELS(LEVELS)) u_obs (.a(obs_a), .b(obs_b), .c(obs_c));

  obs_digit_serial #(.N(N), .LEVELS(LEVELS - 1)) u_ds (
    .clk, .rst_n, .start(ds_start), .a(ds_a), .b(ds_b),
    .busy(ds_busy), .done(ds_done), .c(ds_c)
  );

  ofka_mul4 u_m4 (.a(m4_a), .b(m4_b), .c(m4_c));

  mul8_4x4  u_m8 (.a(m8_a), .b(m8_b), .c(m8_c));

endmodule
