// Testbench of the division-by-three exponent ROM: every one of the 151
// words must satisfy index = 3n + r with r < 3; indexes past the ROM read 0.
module tb_exp_div3_rom;
  logic       clk = 1'b0;
  logic [7:0] index = '0;
  logic [5:0] n;
  logic [1:0] r;
  int checks = 0, failures = 0;

  exp_div3_rom dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      index = 8'(i);
      @(posedge clk);
      checks++;
      if (i < 151) begin
        if (3 * int'(n) + int'(r) != i || r > 2) begin
          failures++;
          $display("FAIL index %0d: n=%0d r=%0d", i, n, r);
        end
      end else if (n != 0 || r != 0) begin
        failures++;
        $display("FAIL index %0d beyond the ROM: n=%0d r=%0d", i, n, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
