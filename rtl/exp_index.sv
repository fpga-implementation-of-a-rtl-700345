// Initial exponent and exponent-ROM index generation.
//
// With the significand taken as the 24-bit integer M, a normal operand is
// X = M * 2^Iexp with Iexp = E - bias - 23. This stage forms Iexp as a
// signed value, its sign, and its magnitude |Iexp|, which addresses the
// division-by-three ROM. For normal operands (E in 1..254) Iexp lies in
// -149..104, so the index never exceeds 149 and fits the 151-word ROM.
//
// Purely combinational.
module exp_index
  import cbrt_pkg::*;
(
  input  logic [EXP_W-1:0] exp,        // biased exponent field E
  output logic signed [9:0] iexp,      // E - 127 - 23
  output logic             iexp_neg,   // sign of Iexp
  output logic [7:0]       rom_index   // |Iexp|
);

  logic signed [9:0] mag;

  always_comb begin
    iexp      = signed'({2'b00, exp}) - 10'sd150;
    iexp_neg  = iexp[9];
    mag       = iexp_neg ? -iexp : iexp;
    rom_index = mag[7:0];
  end

endmodule
