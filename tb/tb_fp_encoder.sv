// Testbench of the encoder: normal results across the exponent range,
// exponents past both ends (overflow to infinity, underflow to zero), and
// every special operand class with both signs, against the binary32 encoding
// rules.
module tb_fp_encoder;
  import cbrt_pkg::*;

  logic        clk = 1'b0;
  logic        sign = 1'b0;
  fp_class_e   cls = CLS_NORMAL;
  logic [22:0] nan_frac = '0;
  logic [23:0] fcr = 24'h800000;
  logic signed [9:0] fexp = 10'sd127;
  logic [31:0] result;
  logic        invalid, overflow, underflow;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0;

  fp_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] er;
      logic ei, eo, eu;
      int fe;
      sign = 1'($urandom);
      nan_frac = 23'($urandom);
      fcr = {1'b1, 23'($urandom)};
      fe = int'($urandom % 300) - 20;
      fexp = 10'(fe);
      case ($urandom % 8)
        0: cls = CLS_ZERO;
        1: cls = CLS_INF;
        2: cls = CLS_QNAN;
        3: cls = CLS_SNAN;
        default: cls = CLS_NORMAL;
      endcase
      if (cls == CLS_QNAN) nan_frac[22] = 1'b1;
      @(posedge clk);
      ei = 1'b0; eo = 1'b0; eu = 1'b0;
      if (cls == CLS_ZERO)       er = sign ? 32'h8000_0000 : 32'h0000_0000;
      else if (cls == CLS_INF)   er = sign ? 32'hFF80_0000 : 32'h7F80_0000;
      else if (cls == CLS_QNAN)  er = {sign, 8'hFF, nan_frac};
      else if (cls == CLS_SNAN) begin
        er = {sign, 8'hFF, 1'b1, nan_frac[21:0]};
        ei = 1'b1;
      end else if (fe > 254) begin
        er = sign ? 32'hFF80_0000 : 32'h7F80_0000;
        eo = 1'b1;
        n_ovf++;
      end else if (fe < 1) begin
        er = sign ? 32'h8000_0000 : 32'h0000_0000;
        eu = 1'b1;
        n_unf++;
      end else er = {sign, 8'(fe), fcr[22:0]};
      checks++;
      if (result !== er || invalid !== ei || overflow !== eo || underflow !== eu) begin
        failures++;
        $display("FAIL cls=%0d fexp=%0d: %h expected %h flags %b%b%b", cls, fe, result, er,
                 invalid, overflow, underflow);
      end
    end
    checks++;
    if (n_ovf == 0 || n_unf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
