// Binary32 decoder and special-case detector, the first stage of the cube
// root core.
//
// Splits the 32-bit operand into sign, 8-bit biased exponent and the 24-bit
// significand with its hidden one restored, and classifies the operand as
// normal, zero, infinity, quiet NaN or signalling NaN. Following the
// operand format of the core, a zero exponent field (zero or subnormal) is
// classified as zero: subnormal operands are flushed to zero, a choice of
// this design. The NaN split uses the IEEE 754-2008 convention that the
// fraction MSB set marks a quiet NaN.
//
// Purely combinational; the enclosing core registers its output.
module fp_decoder
  import cbrt_pkg::*;
(
  input  logic [31:0]  x,     // binary32 operand
  output fp_decoded_t  dec    // sign, exponent, significand, class
);

  logic [EXP_W-1:0]  e;
  logic [FRAC_W-1:0] t;

  always_comb begin
    e = x[30:23];
    t = x[22:0];
    dec.sign = x[31];
    dec.exp  = e;
    dec.man  = {(e != '0), t};
    if (e == '0)
      dec.cls = CLS_ZERO;
    else if (e == '1 && t == '0)
      dec.cls = CLS_INF;
    else if (e == '1 && t[FRAC_W-1])
      dec.cls = CLS_QNAN;
    else if (e == '1)
      dec.cls = CLS_SNAN;
    else
      dec.cls = CLS_NORMAL;
  end

endmodule
