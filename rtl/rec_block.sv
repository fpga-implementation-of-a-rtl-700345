// Newton-Raphson reciprocal step, the "first block" of the cube root unit.
//
// Computes y' = y * (2 - x*y) = 2y - x*y^2, one step of the iteration for
// 1/x, in three clock cycles:
//   cycle 1  squarer y*y (48 bits) and the doubled estimate 2y (26 bits),
//   cycle 2  multiplier x * y^2, truncated to 48 bits,
//   cycle 3  subtractor 2y - x*y^2.
// The difference is truncated to 24 bits for feedback into the next step and
// to 32 bits for the cube root step, as in the published datapath.
// Formats: x UQ0.24, y UQ1.23, y^2 and the product UQ2.46, 2y UQ2.24. The
// 26-bit width of 2y and the truncation points follow the published figure;
// the binary-point placement is this design's choice.
//
// Timing: start and the operands are sampled on a rising edge; done and the
// outputs are valid after the third following edge (done is high for one
// cycle, the outputs hold until the next result). A new step may start in
// any cycle, including the one in which done is high.
module rec_block (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [23:0] x,        // value whose reciprocal is sought, UQ0.24
  input  logic [23:0] y,        // current estimate of 1/x, UQ1.23
  output logic        done,
  output logic [23:0] y_next,   // new estimate, UQ1.23
  output logic [31:0] y_next32  // new estimate, UQ1.31
);

  logic        v1, v2, v3;
  logic [47:0] sq1;       // y^2, UQ2.46
  logic [25:0] twoy1;     // 2y, UQ2.24
  logic [23:0] x1;
  logic [47:0] p2;        // x*y^2 truncated, UQ2.46
  logic [25:0] twoy2;
  logic [47:0] d3;        // 2y - x*y^2, UQ2.46
  logic [71:0] prod;

  assign prod = x1 * sq1;   // UQ2.70

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      v3 <= 1'b0;
      sq1   <= '0;
      twoy1 <= '0;
      x1    <= '0;
      p2    <= '0;
      twoy2 <= '0;
      d3    <= '0;
    end else begin
      v1 <= start;
      v2 <= v1;
      v3 <= v2;
      if (start) begin
        sq1   <= y * y;
        twoy1 <= {y, 2'b00};
        x1    <= x;
      end
      if (v1) begin
        p2    <= prod[71:24];
        twoy2 <= twoy1;
      end
      if (v2)
        d3 <= {twoy2, 22'd0} - p2;
    end
  end

  assign done     = v3;
  assign y_next   = d3[46:23];
  assign y_next32 = d3[46:15];

endmodule
