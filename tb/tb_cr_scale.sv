// Testbench of the rescaling stage. For random cube roots rQ in [0.79,1),
// every remainder r, both signs of Iexp and partial exponents n up to 49,
// the product rQ' must equal rQ * 2^(+-r/3), computed in real arithmetic,
// within the precision of the 24-bit constants, and Pexp' must be n, -n or
// -n-1 as the sign and remainder require.
module tb_cr_scale;
  logic        clk = 1'b0;
  logic [31:0] rq = '0;
  logic [1:0]  r = '0;
  logic        iexp_neg = 1'b0;
  logic [5:0]  pexp = '0;
  logic [55:0] rq_s;
  logic signed [7:0] pexp_p;
  int checks = 0, failures = 0;

  cr_scale dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      real rv, kv, ev, gv, err;
      int  ep;
      rq = {2'b11, 30'($urandom)};
      if (rq < 32'hCB2FF529) rq = 32'hCB2FF529 + 32'($urandom % 1000);
      r = 2'($urandom % 3);
      iexp_neg = 1'($urandom);
      pexp = 6'($urandom % 50);
      @(posedge clk);
      rv = real'(rq) / 4294967296.0;
      kv = 2.0 ** ((iexp_neg ? -1.0 : 1.0) * real'(r) / 3.0);
      ev = rv * kv;
      gv = real'(rq_s[55:24]) / 2147483648.0;
      err = (gv - ev) / ev;
      if (err < 0.0) err = -err;
      if (!iexp_neg)    ep = int'(pexp);
      else if (r == 0)  ep = -int'(pexp);
      else              ep = -int'(pexp) - 1;
      checks++;
      if (err > 1.2e-7 || int'(pexp_p) != ep) begin
        failures++;
        $display("FAIL rq=%h r=%0d neg=%b n=%0d: rq'=%h (%f, expected %f) pexp'=%0d expected %0d",
                 rq, r, iexp_neg, pexp, rq_s, gv, ev, pexp_p, ep);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
