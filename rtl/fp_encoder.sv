// Binary32 encoder and special-case output stage.
//
// Packs sign, final exponent and the 23 fraction bits after the leading one
// of Fcr. Special operands override the computed value: the cube root of a
// (signed) zero or subnormal operand is a zero of the same sign, of an
// infinity an infinity of the same sign, and a NaN operand gives a quiet NaN
// with its payload kept (a signalling NaN is quietened and raises invalid).
// The exponent range is checked again: Fexp >= 255 gives an infinity and
// overflow, Fexp <= 0 a zero and underflow. (With binary32 operands the
// cube root exponent always lies well inside the range, so these two flags
// stay low in practice; they are kept as the range check of the datapath.)
//
// Purely combinational.
module fp_encoder
  import cbrt_pkg::*;
(
  input  logic              sign,
  input  fp_class_e         cls,
  input  logic [22:0]       nan_frac,    // operand fraction, NaN payload
  input  logic [23:0]       fcr,
  input  logic signed [9:0] fexp,
  output logic [31:0]       result,
  output logic              invalid,
  output logic              overflow,
  output logic              underflow
);

  always_comb begin
    invalid   = 1'b0;
    overflow  = 1'b0;
    underflow = 1'b0;
    unique case (cls)
      CLS_ZERO: result = {sign, 31'd0};
      CLS_INF:  result = {sign, 8'hFF, 23'd0};
      CLS_QNAN: result = {sign, 8'hFF, nan_frac};
      CLS_SNAN: begin
        result  = {sign, 8'hFF, 1'b1, nan_frac[21:0]};
        invalid = 1'b1;
      end
      default: begin
        if (fexp >= 10'sd255) begin
          result   = {sign, 8'hFF, 23'd0};
          overflow = 1'b1;
        end else if (fexp <= 10'sd0) begin
          result    = {sign, 31'd0};
          underflow = 1'b1;
        end else begin
          result = {sign, fexp[7:0], fcr[22:0]};
        end
      end
    endcase
  end

endmodule
