// Significand and exponent update after rounding.
//
// Adds add_one to the 24 kept bits Q[31:8], giving the final cube root Fcr
// with 0.Fcr in [0.5,1). If the increment carries out (all 24 bits were
// ones), Fcr becomes 0.1000... and the exponent grows by one. Since the
// result is 0.Fcr * 2^(Pexp + 8) = 1.Fcr[22:0] * 2^(Pexp + 7), the biased
// final exponent is Fexp = Pexp + 7 + 127 (+1 on carry). Fexp is returned as
// a 10-bit signed number so that the encoder can test its range.
//
// Purely combinational.
module q_update
  import cbrt_pkg::*;
(
  input  logic [31:0]       q,
  input  logic              add_one,
  input  logic signed [7:0] pexp,
  output logic [23:0]       fcr,       // rounded significand, MSB = 1
  output logic signed [9:0] fexp       // biased exponent
);

  logic [24:0] sum;

  always_comb begin
    sum = {1'b0, q[31:8]} + 25'(add_one);
    if (sum[24]) begin
      fcr  = sum[24:1];
      fexp = 10'(pexp) + 10'(BIAS + 8);
    end else begin
      fcr  = sum[23:0];
      fexp = 10'(pexp) + 10'(BIAS + 7);
    end
  end

endmodule
