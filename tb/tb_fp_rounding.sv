// Testbench of the rounding decision: all 16 combinations of LSB, guard,
// round and sticky against round-to-nearest-even worked out from the value
// of the discarded fraction.
module tb_fp_rounding;
  logic clk = 1'b0;
  logic lsb = 1'b0, guard = 1'b0, round = 1'b0, sticky = 1'b0;
  logic add_one;
  int checks = 0, failures = 0;

  fp_rounding dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      real frac;
      logic up;
      {lsb, guard, round, sticky} = 4'(i);
      @(posedge clk);
      // Discarded part in units of the kept LSB (sticky stands for some
      // value strictly between 0 and 1/4).
      frac = (guard ? 0.5 : 0.0) + (round ? 0.25 : 0.0) + (sticky ? 0.125 : 0.0);
      up = (frac > 0.5) || (frac == 0.5 && lsb);
      checks++;
      if (add_one !== up) begin
        failures++;
        $display("FAIL lsb=%b g=%b r=%b s=%b add_one=%b", lsb, guard, round, sticky, add_one);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
