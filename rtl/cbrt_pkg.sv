// Shared types and constants of the binary32 cube root core.
//
// The core splits a binary32 operand X = M * 2^Iexp (M the 24-bit integer
// significand, Iexp = E - 127 - 23) into |Iexp| = 3n + r, takes the cube
// root of the significand fraction M/2^24 in [0.5,1) by Newton-Raphson and
// rescales the result by 2^n and the cube root of 2^r. This package holds
// the binary32 field widths, the operand class produced by the decoder, the
// fixed-point constants cbrt(2), cbrt(4), 1/cbrt(2), 1/cbrt(4) and 1/3, and
// the default iteration counts (two reciprocal steps, one cube root step).
//
// Fixed-point formats used throughout (UQa.b = unsigned, a integer bits,
// b fraction bits):
//   c   operand fraction M/2^24          UQ0.24 (24 bits)
//   x   cube root estimate               UQ0.24 (24 bits), UQ0.32 at output
//   y   reciprocal estimate 1/x          UQ1.23 (24 bits), UQ1.31 at output
//   K   scaling constant cbrt(2^+-r)     UQ1.23 (24 bits)
//   rQ' scaled root rQ * K               UQ1.55 (56 bits)
// The scaling constants are round(value * 2^23); ONE_THIRD is round(2^32/3).
package cbrt_pkg;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned FRAC_W = 23;
  localparam int unsigned MAN_W  = 24;   // significand with hidden one
  localparam int          BIAS   = 127;

  localparam int unsigned REC_ITER_DEFAULT = 2;
  localparam int unsigned CR_ITER_DEFAULT  = 1;

  // Scaling constants, UQ1.23.
  localparam logic [23:0] K_ONE     = 24'h800000;   // 1.0
  localparam logic [23:0] K_CUBE2   = 24'hA14518;   // 2^(1/3)
  localparam logic [23:0] K_CUBE4   = 24'hCB2FF5;   // 2^(2/3)
  localparam logic [23:0] K_RECUBE2 = 24'h6597FB;   // 2^(-1/3)
  localparam logic [23:0] K_RECUBE4 = 24'h50A28C;   // 2^(-2/3)

  // 1/3 as UQ0.32.
  localparam logic [31:0] ONE_THIRD = 32'h55555555;

  // Operand classes seen by the decoder. Subnormal operands are treated as
  // zero.
  typedef enum logic [2:0] {
    CLS_NORMAL = 3'd0,
    CLS_ZERO   = 3'd1,
    CLS_INF    = 3'd2,
    CLS_QNAN   = 3'd3,
    CLS_SNAN   = 3'd4
  } fp_class_e;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [MAN_W-1:0]  man;    // {1, fraction}; fraction alone for NaN payloads
    fp_class_e         cls;
  } fp_decoded_t;

endpackage
