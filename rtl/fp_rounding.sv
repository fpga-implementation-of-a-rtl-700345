// Rounding decision, round to nearest with ties to even.
//
// From the least significant kept bit, the guard bit, the round bit and the
// sticky bit, add_one is set when the discarded part exceeds half an LSB, or
// equals it and the LSB is odd: add_one = G & (R | STK | LSB). The sign does
// not enter this rounding mode.
//
// Purely combinational.
module fp_rounding (
  input  logic lsb,
  input  logic guard,
  input  logic round,
  input  logic sticky,
  output logic add_one
);

  assign add_one = guard & (round | sticky | lsb);

endmodule
