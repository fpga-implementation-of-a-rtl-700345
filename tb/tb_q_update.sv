// Testbench of the significand/exponent update. For random normalised Q,
// increments and exponents (including all-ones significands that carry out)
// the binary32 value 1.Fcr * 2^(Fexp - 127) must equal
// (Q[31:8] + add_one) / 2^24 * 2^(Pexp + 8) exactly, with the MSB of Fcr set.
module tb_q_update;
  logic        clk = 1'b0;
  logic [31:0] q = 32'h8000_0000;
  logic        add_one = 1'b0;
  logic signed [7:0] pexp = '0;
  logic [23:0] fcr;
  logic signed [9:0] fexp;
  int checks = 0, failures = 0;
  int carries = 0;

  q_update dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      real ev, gv;
      q = {1'b1, 31'($urandom)};
      if (i % 10 == 0) q[31:8] = '1;
      add_one = 1'($urandom);
      pexp = 8'(int'($urandom % 120) - 60);
      @(posedge clk);
      if (q[31:8] == '1 && add_one) carries++;
      ev = (real'(q[31:8]) + (add_one ? 1.0 : 0.0)) / 16777216.0 * (2.0 ** real'(int'(pexp) + 8));
      gv = (1.0 + real'(fcr[22:0]) / 8388608.0) * (2.0 ** real'(int'(fexp) - 127));
      checks++;
      if (gv != ev || !fcr[23]) begin
        failures++;
        $display("FAIL q=%h add=%b pexp=%0d: fcr=%h fexp=%0d", q, add_one, pexp, fcr, fexp);
      end
    end
    checks++;
    if (carries == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
