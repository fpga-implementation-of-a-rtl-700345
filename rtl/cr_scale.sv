// Cube root output updating: rescaling by the exponent remainder.
//
// With |Iexp| = 3n + r, the cube root of 2^Iexp is 2^n * cbrt(2^r) for a
// non-negative Iexp and 2^-n / cbrt(2^r) for a negative one. This stage
// multiplies the unit result rQ by the matching constant and selects the
// partial exponent:
//   rQ' = rQ * 1 (r = 0), cbrt(2) or cbrt(4) (Iexp >= 0, r = 1 or 2),
//         1/cbrt(2) or 1/cbrt(4) (Iexp < 0, r = 1 or 2);
//   Pexp' = n (Iexp >= 0), ~n + 1 = -n (Iexp < 0, r = 0),
//           ~n = -n - 1 (Iexp < 0, r != 0).
// The one's-complement case is compensated in q_normalize. Formats: rQ
// UQ0.32, constants UQ1.23, rQ' UQ1.55 (56 bits). Pexp' is an 8-bit two's
// complement number.
//
// Purely combinational.
module cr_scale
  import cbrt_pkg::*;
(
  input  logic [31:0]       rq,         // cube root of the fraction, UQ0.32
  input  logic [1:0]        r,          // |Iexp| mod 3
  input  logic              iexp_neg,   // sign of Iexp
  input  logic [5:0]        pexp,       // n = |Iexp| div 3
  output logic [55:0]       rq_s,       // rQ', UQ1.55
  output logic signed [7:0] pexp_p      // Pexp'
);

  logic [23:0] k;
  logic [7:0]  n8;

  always_comb begin
    unique case ({iexp_neg, r})
      3'b0_01: k = K_CUBE2;
      3'b0_10: k = K_CUBE4;
      3'b1_01: k = K_RECUBE2;
      3'b1_10: k = K_RECUBE4;
      default: k = K_ONE;
    endcase
    rq_s = rq * k;

    n8 = {2'b00, pexp};
    if (!iexp_neg)
      pexp_p = signed'(n8);
    else if (r == 2'd0)
      pexp_p = signed'(~n8 + 8'd1);
    else
      pexp_p = signed'(~n8);
  end

endmodule
