// Testbench of the cube root seed ROM. Every word is compared with the cube
// root of 0.5 + i/64 computed in real arithmetic (the seed must be that root
// rounded up to 24 bits), and the rows of the published seed table whose
// values are legible are checked bit for bit.
module tb_cr_seed_rom;
  logic        clk = 1'b0;
  logic [4:0]  index = '0;
  logic [21:0] word;
  logic [23:0] cr0;
  int checks = 0, failures = 0;

  cr_seed_rom dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_row(input int i, input logic [21:0] w);
    index = 5'(i);
    @(posedge clk);
    checks++;
    if (word !== w) begin
      failures++;
      $display("FAIL table row %0d: %b expected %b", i, word, w);
    end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) begin
      real v, d;
      index = 5'(i);
      @(posedge clk);
      v = ((0.5 + i / 64.0) ** (1.0 / 3.0)) * 16777216.0;
      d = real'(cr0) - v;
      checks++;
      if (d < 0.0 || d >= 1.0 || cr0[23:22] != 2'b11) begin
        failures++;
        $display("FAIL index %0d: cr0=%h real %f", i, cr0, v);
      end
    end
    check_row(0,  22'b0010110010111111110110);
    check_row(4,  22'b0100110101001011000111);
    check_row(9,  22'b0111001010111110011000);
    check_row(16, 22'b1010001001011101101001);
    check_row(31, 22'b1111101010100011100000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
