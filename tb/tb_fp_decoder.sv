// Testbench of the binary32 decoder: every operand class, directed and
// random, checked field by field against the IEEE 754 encoding rules.
module tb_fp_decoder;
  import cbrt_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] x = '0;
  fp_decoded_t dec;
  int checks = 0, failures = 0;

  fp_decoder dut (.x(x), .dec(dec));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] v);
    fp_class_e cls;
    logic [23:0] man;
    x = v;
    @(posedge clk);
    if (v[30:23] == 8'd0)                         cls = CLS_ZERO;
    else if (v[30:23] == 8'd255 && v[22:0] == 0)  cls = CLS_INF;
    else if (v[30:23] == 8'd255 && v[22] == 1'b1) cls = CLS_QNAN;
    else if (v[30:23] == 8'd255)                  cls = CLS_SNAN;
    else                                          cls = CLS_NORMAL;
    man = (v[30:23] == 0) ? {1'b0, v[22:0]} : {1'b1, v[22:0]};
    checks++;
    if (dec.sign !== v[31] || dec.exp !== v[30:23] || dec.man !== man || dec.cls !== cls) begin
      failures++;
      $display("FAIL x=%h sign=%b exp=%h man=%h cls=%0d", v, dec.sign, dec.exp, dec.man, dec.cls);
    end
  endtask

  initial begin
    check(32'h3F80_0000);
    check(32'hBE58_0000);   // -0.2109375: S=1, E=124, M=1.6875
    check(32'h0000_0000);
    check(32'h8000_0001);
    check(32'h7F80_0000);
    check(32'hFF80_0000);
    check(32'h7FC0_0000);
    check(32'h7F80_0001);
    check(32'h7FBF_FFFF);
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] v;
      v = $urandom;
      if (i % 4 == 0) v[30:23] = 8'hFF;
      if (i % 4 == 1) v[30:23] = 8'h00;
      check(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
