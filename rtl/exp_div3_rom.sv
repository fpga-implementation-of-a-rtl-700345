// Division-by-three ROM for the exponent.
//
// Taking a cube root divides the exponent by three, so |Iexp| is written as
// 3n + r with r in 0..2. The ROM has DEPTH words of 8 bits, each holding n
// in the upper six bits and r in the lower two (word = n & r); the partial
// exponent Pexp is n. The contents are computed at elaboration as
// word[i] = {i / 3, i % 3}. The 151-word depth covers every index a normal
// binary32 operand produces (0..149).
//
// Read asynchronously; the enclosing core registers the output.
module exp_div3_rom #(
  parameter int unsigned DEPTH = 151
) (
  input  logic [7:0] index,   // |Iexp|
  output logic [5:0] n,       // quotient, the partial exponent Pexp
  output logic [1:0] r        // remainder
);

  typedef logic [7:0] word_t;

  function automatic word_t div3_word(input int unsigned i);
    logic [5:0] q;
    logic [1:0] m;
    q = 6'(i / 3);
    m = 2'(i % 3);
    return {q, m};
  endfunction

  word_t rom [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++)
      rom[i] = div3_word(i);
  end

  word_t word;

  always_comb begin
    word = (32'(index) < DEPTH) ? rom[index] : '0;
    n    = word[7:2];
    r    = word[1:0];
  end

endmodule
