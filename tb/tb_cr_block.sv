// Testbench of the Newton-Raphson cube root step. Random fractions c in
// [0.5,1), estimates x near cbrt(c) and reciprocals y near 1/x are applied,
// some in consecutive cycles; each result must equal (2x + c*y^2)/3, computed
// in real arithmetic, to within the datapath truncation and arrive exactly
// four edges after its start. A step whose exact result reaches 1.0 must
// saturate just below 1.
module tb_cr_block;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [31:0] y32 = '0;
  logic [23:0] c = '0, x = '0;
  logic        done;
  logic [23:0] x_next;
  logic [31:0] x_next32;
  int checks = 0, failures = 0;
  int saturations = 0;

  cr_block dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real exp_q[$];
  int  due_q[$];
  int  cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (rst_n && done) begin
      real e, got, got32;
      int due;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected done");
      end else begin
        e = exp_q.pop_front();
        due = due_q.pop_front();
        got   = real'(x_next) / 16777216.0;
        got32 = real'(x_next32) / 4294967296.0;
        if (e >= 1.0) begin
          saturations++;
          if (x_next32 != '1) begin
            failures++;
            $display("FAIL no saturation: %h", x_next32);
          end
        end else if (cyc != due || got32 - e > 1.0e-9 || e - got32 > 3.0e-7 ||
                     got - e > 1.0e-9 || e - got > 3.5e-7) begin
          failures++;
          $display("FAIL got %f (%f) expected %f cycle %0d due %0d", got, got32, e, cyc, due);
        end
      end
    end
  end

  task automatic issue(input real cv, input real xv, input real yv);
    logic [23:0] ci, xi;
    logic [31:0] yi;
    real cr, xr, yr;
    ci = 24'($rtoi(cv * 16777216.0));
    xi = 24'($rtoi(xv * 16777216.0));
    yi = 32'(longint'(yv * 2147483648.0));
    cr = real'(ci) / 16777216.0;
    xr = real'(xi) / 16777216.0;
    yr = real'(yi) / 2147483648.0;
    @(negedge clk);
    c = ci;
    x = xi;
    y32 = yi;
    start = 1'b1;
    exp_q.push_back((2.0 * xr + cr * yr * yr) / 3.0);
    due_q.push_back(cyc + 4);
    @(posedge clk);
    #1 start = 1'b0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1500; i++) begin
      real cv, xv;
      cv = 0.5 + ($urandom % 1000000) / 2.0e6;
      xv = (cv ** (1.0 / 3.0)) * (0.99 + ($urandom % 1000) / 50000.0);
      if (xv >= 0.99999) xv = 0.99999;
      issue(cv, xv, (1.0 / xv) * (1.0 + ($urandom % 100) / 1.0e7));
      if ($urandom % 3 == 0) repeat ($urandom % 6) @(posedge clk);
    end
    // Result at or above 1.0: saturates.
    issue(0.99999994, 0.99999994, 1.001);
    repeat (8) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || saturations == 0) begin
      failures++;
      $display("FAIL pending %0d saturations %0d", exp_q.size(), saturations);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
