// Testbench of the normalisation stage. rQ' values above 1, in [0.5,1) and
// just below 0.5 are applied with every remainder and sign; the stage must
// return Q with its MSB set, the same value 0.Q * 2^Pexp as
// rQ' * 2^(Pexp' + c) (c = 1 for a negative Iexp with r != 0, else 0) up to
// the truncated bits, and LSB, guard, round and sticky taken from Q.
module tb_q_normalize;
  logic        clk = 1'b0;
  logic [55:0] rq_s = '0;
  logic signed [7:0] pexp_p = '0;
  logic [1:0]  r = '0;
  logic        iexp_neg = 1'b0;
  logic [31:0] q;
  logic signed [7:0] pexp;
  logic        lsb, guard, round, sticky;
  int checks = 0, failures = 0;
  int cases[3];

  q_normalize dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [55:0] v, sh;
      int s, ep;
      logic [31:0] eq;
      v = {24'($urandom), 32'($urandom)};
      case (i % 3)
        0: v[55] = 1'b1;
        1: v[55:54] = 2'b01;
        default: v[55:48] = 8'b00111111;
      endcase
      rq_s = v;
      pexp_p = 8'(int'($urandom % 100) - 50);
      r = 2'($urandom % 3);
      iexp_neg = 1'($urandom);
      @(posedge clk);
      // Reference: shift left until the integer bit is set.
      sh = v;
      s = 0;
      while (!sh[55]) begin
        sh = sh << 1;
        s++;
      end
      cases[s]++;
      eq = sh[55:24];
      ep = int'(pexp_p) + ((iexp_neg && r != 0) ? 1 : 0) + 1 - s;
      checks++;
      if (q !== eq || int'(pexp) != ep || lsb !== eq[8] || guard !== eq[7] ||
          round !== eq[6] || sticky !== ((eq & 32'h3F) != 0)) begin
        failures++;
        $display("FAIL rq'=%h q=%h expected %h pexp=%0d expected %0d", v, q, eq, pexp, ep);
      end
    end
    checks++;
    if (cases[0] == 0 || cases[1] == 0 || cases[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
