// Seed ROM of the reciprocal iteration.
//
// Word i holds the reciprocal of x = 0.5 + i/64, a value in (1,2], with its
// leading one dropped: the 24-bit seed REC0 (UQ1.23) is 1 & word. The value
// is rounded up to 23 fraction bits, as in the published table, and the
// entry for x = 0.5, whose reciprocal 2.0 cannot be held, saturates to all
// ones:
//   word[i] = min( ceil(2^29 / (32 + i)) - 2^23, 2^23 - 1 ).
// The cube root unit addresses it with the five bits after the leading one of
// the cube root seed CR0. The contents are computed at elaboration.
//
// Read asynchronously.
module rec_seed_rom (
  input  logic [4:0]  index,   // bits after the leading one of CR0
  output logic [22:0] word,    // stored 23 bits
  output logic [23:0] rec0     // seed 1 & word, UQ1.23
);

  function automatic logic [22:0] rec_ceil(input int unsigned i);
    int unsigned d;
    int unsigned q;
    d = 32 + i;
    q = ((32'd1 << 29) + d - 1) / d;   // ceil(2^29 / d)
    if (q >= (32'd1 << 24)) return '1;
    return 23'(q - (32'd1 << 23));
  endfunction

  logic [22:0] rom [32];

  initial begin
    for (int unsigned i = 0; i < 32; i++)
      rom[i] = rec_ceil(i);
  end

  always_comb begin
    word = rom[index];
    rec0 = {1'b1, word};
  end

endmodule
