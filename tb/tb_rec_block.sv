// Testbench of the Newton-Raphson reciprocal step. Random x in [0.75,1) and
// estimates y within a few percent of 1/x are applied, some back to back in
// consecutive cycles; each output must equal y*(2 - x*y), computed in real
// arithmetic, to within the truncation of the datapath, must arrive exactly
// three edges after its start, and the error |1 - x*y| must shrink to about
// its square.
module tb_rec_block;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [23:0] x = '0, y = '0;
  logic        done;
  logic [23:0] y_next;
  logic [31:0] y_next32;
  int checks = 0, failures = 0;

  rec_block dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected results queued by start cycle.
  real exp_q[$];
  real err0_q[$];
  real x_q[$];
  int  due_q[$];
  int  cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (rst_n && done) begin
      real e, got, got32, err1, err0;
      int due;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected done");
      end else begin
        e = exp_q.pop_front();
        err0 = err0_q.pop_front();
        due = due_q.pop_front();
        got   = real'(y_next) / 8388608.0;
        got32 = real'(y_next32) / 2147483648.0;
        err1  = 1.0 - x_q.pop_front() * got32;
        if (err1 < 0.0) err1 = -err1;
        if (cyc != due || got - e > 1.0e-6 || e - got > 3.0e-7 ||
            got32 - e > 1.0e-7 || e - got32 > 3.0e-7 ||
            err1 > err0 * err0 + 1.0e-6) begin
          failures++;
          $display("FAIL got %f (%f) expected %f cycle %0d due %0d", got, got32, e, cyc, due);
        end
      end
    end
  end

  task automatic issue(input real xv, input real yv);
    logic [23:0] xi, yi;
    real xr, yr;
    xi = 24'($rtoi(xv * 16777216.0));
    yi = 24'($rtoi(yv * 8388608.0));
    xr = real'(xi) / 16777216.0;
    yr = real'(yi) / 8388608.0;
    @(negedge clk);
    x = xi;
    y = yi;
    start = 1'b1;
    exp_q.push_back(yr * (2.0 - xr * yr));
    err0_q.push_back(1.0 - xr * yr);
    x_q.push_back(xr);
    due_q.push_back(cyc + 3);
    @(posedge clk);
    #1 start = 1'b0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1500; i++) begin
      real xv, yv;
      xv = 0.75 + ($urandom % 1000000) / 4.0e6;
      yv = (1.0 / xv) * (0.97 + ($urandom % 1000) / 16000.0);
      issue(xv, yv);
      if ($urandom % 3 == 0) repeat ($urandom % 5) @(posedge clk);
    end
    repeat (8) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
