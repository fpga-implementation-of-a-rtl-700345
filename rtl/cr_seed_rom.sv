// Seed ROM of the cube root iteration.
//
// The operand fraction c lies in [0.5,1), so it has the form .1abcde...; the
// five bits abcde after the leading one address this 32-word ROM. Word i
// holds the initial cube root CR0 for c = 0.5 + i/64, whose root lies in
// [0.79,1) and therefore starts with the two ones .11. Only the 22 bits after
// those two ones are stored; the full 24-bit seed (UQ0.24) is .11 & word.
// The word is the root rounded up to 24 bits, as in the published table:
//   CR0[i] = ceil( cbrt((32 + i) / 64) * 2^24 ),  word[i] = CR0[i] - 3*2^22.
// The contents are computed at elaboration with an integer cube root.
//
// Read asynchronously.
module cr_seed_rom (
  input  logic [4:0]  index,   // c bits after its leading one
  output logic [21:0] word,    // stored 22 bits
  output logic [23:0] cr0      // seed .11 & word, UQ0.24
);

  // Smallest y with y^3 >= (32 + i) * 2^66, i.e. ceil of the root in UQ0.24.
  function automatic logic [23:0] cbrt_ceil(input int unsigned i);
    logic [79:0] target;
    logic [79:0] cube;
    logic [23:0] y;
    logic [23:0] t;
    target = 80'(32 + i) << 66;
    y = '0;
    for (int b = 23; b >= 0; b--) begin
      t = y | (24'd1 << b);
      cube = 80'(t) * 80'(t) * 80'(t);
      if (cube <= target) y = t;
    end
    cube = 80'(y) * 80'(y) * 80'(y);
    if (cube != target) y = y + 24'd1;
    return y;
  endfunction

  logic [21:0] rom [32];

  initial begin
    for (int unsigned i = 0; i < 32; i++)
      rom[i] = 22'(cbrt_ceil(i) - 24'hC00000);
  end

  always_comb begin
    word = rom[index];
    cr0  = {2'b11, word};
  end

endmodule
