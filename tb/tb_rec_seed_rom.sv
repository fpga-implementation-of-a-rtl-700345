// Testbench of the reciprocal seed ROM. Every word is compared with
// 1/(0.5 + i/64) computed in real arithmetic (rounded up to 23 fraction
// bits, the first entry saturated), and the legible rows of the published
// seed table are checked bit for bit.
module tb_rec_seed_rom;
  logic        clk = 1'b0;
  logic [4:0]  index = '0;
  logic [22:0] word;
  logic [23:0] rec0;
  int checks = 0, failures = 0;

  rec_seed_rom dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_row(input int i, input logic [22:0] w);
    index = 5'(i);
    @(posedge clk);
    checks++;
    if (word !== w) begin
      failures++;
      $display("FAIL table row %0d: %b expected %b", i, word, w);
    end
  endtask

  initial begin
    for (int i = 1; i < 32; i++) begin
      real v, d;
      index = 5'(i);
      @(posedge clk);
      v = 8388608.0 / (0.5 + i / 64.0);
      d = real'(rec0) - v;
      checks++;
      if (d < 0.0 || d >= 1.0) begin
        failures++;
        $display("FAIL index %0d: rec0=%h real %f", i, rec0, v);
      end
    end
    check_row(0,  23'b11111111111111111111111);
    check_row(4,  23'b11000111000111000111001);
    check_row(9,  23'b10001111100111000001101);
    check_row(16, 23'b01010101010101010101011);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
