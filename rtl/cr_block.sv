// Newton-Raphson cube root step, the "second block" of the cube root unit.
//
// Computes x' = (2x + c * y^2) / 3, where y approximates 1/x, so that the
// division c / x^2 of the iteration x' = (2x + c/x^2)/3 becomes two
// multiplications. Four clock cycles:
//   cycle 1  squarer y*y, truncated to 24 bits,
//   cycle 2  multiplier y^2 * c (48-bit product),
//   cycle 3  alignment of 2x to the product and addition,
//   cycle 4  multiplication by the constant 1/3.
// The result is given truncated to 24 bits (feedback) and to 32 bits (unit
// output). Formats: c and x UQ0.24, y UQ1.31, y^2 UQ1.23, product UQ1.47,
// sum UQ2.47 (49 bits, one more than the published 48 so that 2x + c*y^2,
// which approaches 3, cannot overflow), 1/3 UQ0.32, results UQ0.24/UQ0.32.
// A result that reaches 1.0 (possible for c just below 1, since the iteration
// approaches the root from above) saturates to the largest value below 1.
//
// Timing: start and operands are sampled on a rising edge; done and the
// outputs are valid after the fourth following edge.
module cr_block
  import cbrt_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] y32,      // reciprocal estimate 1/x, UQ1.31
  input  logic [23:0] c,        // operand fraction, UQ0.24
  input  logic [23:0] x,        // current cube root estimate, UQ0.24
  output logic        done,
  output logic [23:0] x_next,   // UQ0.24
  output logic [31:0] x_next32  // UQ0.32
);

  logic        v1, v2, v3, v4;
  logic [23:0] ysq1;            // y^2, UQ1.23
  logic [23:0] c1, x1, x2;
  logic [47:0] m2;              // y^2 * c, UQ1.47
  logic [48:0] s3;              // 2x + y^2 c, UQ2.47
  logic [31:0] q32_4;           // result, UQ0.32
  logic [63:0] ysq_full;        // UQ2.62
  logic [80:0] third;           // s3 / 3, UQ2.79

  assign ysq_full = y32 * y32;
  assign third    = s3 * ONE_THIRD;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {v1, v2, v3, v4} <= '0;
      ysq1  <= '0;
      c1    <= '0;
      x1    <= '0;
      x2    <= '0;
      m2    <= '0;
      s3    <= '0;
      q32_4 <= '0;
    end else begin
      v1 <= start;
      v2 <= v1;
      v3 <= v2;
      v4 <= v3;
      if (start) begin
        ysq1 <= (ysq_full[63] == 1'b0) ? ysq_full[62:39] : '1;
        c1   <= c;
        x1   <= x;
      end
      if (v1) begin
        m2 <= ysq1 * c1;
        x2 <= x1;
      end
      if (v2)
        s3 <= {1'b0, x2, 24'd0} + {1'b0, m2};
      if (v3)
        q32_4 <= (third[80:79] != 2'b00) ? '1 : third[78:47];
    end
  end

  assign done     = v4;
  assign x_next32 = q32_4;
  assign x_next   = q32_4[31:8];

endmodule
