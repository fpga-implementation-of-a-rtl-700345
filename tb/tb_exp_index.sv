// Testbench of the initial-exponent stage: all 256 exponent fields, checked
// against Iexp = E - 127 - 23 computed with integers.
module tb_exp_index;
  logic        clk = 1'b0;
  logic [7:0]  exp = '0;
  logic signed [9:0] iexp;
  logic        iexp_neg;
  logic [7:0]  rom_index;
  int checks = 0, failures = 0;

  exp_index dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 256; e++) begin
      int ref_iexp, ref_abs;
      exp = 8'(e);
      @(posedge clk);
      ref_iexp = e - 127 - 23;
      ref_abs  = (ref_iexp < 0) ? -ref_iexp : ref_iexp;
      checks++;
      if (int'(iexp) != ref_iexp || iexp_neg != (ref_iexp < 0) || int'(rom_index) != ref_abs) begin
        failures++;
        $display("FAIL E=%0d iexp=%0d neg=%b index=%0d", e, iexp, iexp_neg, rom_index);
      end
    end
    // Example from the format description: E = 124 gives q = -3, Iexp = -26.
    exp = 8'd124;
    @(posedge clk);
    checks++;
    if (int'(iexp) != -26 || rom_index != 8'd26) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
