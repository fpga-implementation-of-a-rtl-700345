// Normalisation of the rescaled root and rounding-bit generation.
//
// The scaled root rQ' (UQ1.55) is brought to a 32-bit Q whose value 0.Q lies
// in [0.5,1): when the integer bit of rQ' is set, Q is the top 32 bits of
// rQ' and the exponent grows by one; otherwise Q is taken one bit lower
// (rQ' shifted left), and, should the product have fallen just below 0.5,
// two bits lower with the exponent reduced by one. For a negative Iexp with
// r != 0 the exponent also gains the one that compensates the ~n selected by
// cr_scale. In every case result = 0.Q * 2^(Pexp + 8).
// The final significand is Q[31:8]; Q[8], Q[7] and Q[6] are the LSB, guard
// and round bits and the sticky bit is the OR of Q[5:0].
//
// Purely combinational.
module q_normalize (
  input  logic [55:0]       rq_s,       // rQ', UQ1.55
  input  logic signed [7:0] pexp_p,     // Pexp'
  input  logic [1:0]        r,
  input  logic              iexp_neg,
  output logic [31:0]       q,          // 0.Q in [0.5,1)
  output logic signed [7:0] pexp,       // updated exponent
  output logic              lsb,
  output logic              guard,
  output logic              round,
  output logic              sticky
);

  logic signed [7:0] base;

  always_comb begin
    base = pexp_p + ((iexp_neg && r != 2'd0) ? 8'sd1 : 8'sd0);
    if (rq_s[55]) begin
      q    = rq_s[55:24];
      pexp = base + 8'sd1;
    end else if (rq_s[54]) begin
      q    = rq_s[54:23];
      pexp = base;
    end else begin
      q    = rq_s[53:22];
      pexp = base - 8'sd1;
    end
    lsb    = q[8];
    guard  = q[7];
    round  = q[6];
    sticky = |q[5:0];
  end

endmodule
