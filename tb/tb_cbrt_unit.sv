// Testbench of the Newton-Raphson cube root unit.
//
// Feeds fractions c in [0.5,1) (both ends of the range, every seed-ROM
// interval, random values) and compares the result rq (UQ0.32) with the
// real-arithmetic cube root of c. With the default iteration counts the
// relative error must stay below TOL; the seed-only error is also measured
// to show that the iterations converge. done must come exactly
// 1 + CR_ITER*(3*REC_ITER + 4) edges after the edge that samples start, and
// the number of reciprocal and cube root steps started is counted.
module tb_cbrt_unit;
  import cbrt_pkg::*;

  localparam int unsigned REC_ITER = REC_ITER_DEFAULT;
  localparam int unsigned CR_ITER  = CR_ITER_DEFAULT;
  localparam int unsigned LATENCY  = 1 + CR_ITER * (3 * REC_ITER + 4);
  localparam real TOL = 1.2e-4;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [23:0] c = 24'h800000;
  logic        busy, done;
  logic [31:0] rq;

  int checks = 0;
  int failures = 0;
  int rec_steps = 0, cr_steps = 0;
  real max_err = 0.0;

  cbrt_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (dut.rec_start) rec_steps++;
    if (dut.cr_start)  cr_steps++;
  end

  task automatic check_c(input logic [23:0] cv);
    int cycles;
    real ref_v, got_v, err;
    int rs0, cs0;
    @(negedge clk);
    c = cv;
    start = 1'b1;
    rs0 = rec_steps;
    cs0 = cr_steps;
    @(posedge clk);
    cycles = 1;
    @(negedge clk);
    start = 1'b0;
    c = 24'($urandom);
    while (!done) begin
      @(posedge clk);
      cycles++;
      @(negedge clk);
    end
    ref_v = (real'(cv) / 16777216.0) ** (1.0 / 3.0);
    got_v = real'(rq) / 4294967296.0;
    err = (got_v - ref_v) / ref_v;
    if (err < 0.0) err = -err;
    if (err > max_err) max_err = err;
    checks++;
    if (err > TOL) begin
      failures++;
      $display("FAIL c=%h rq=%h got %f expected %f err %g", cv, rq, got_v, ref_v, err);
    end
    checks++;
    if (cycles != LATENCY) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cycles, LATENCY);
    end
    checks++;
    if (rec_steps - rs0 != REC_ITER * CR_ITER || cr_steps - cs0 != CR_ITER) begin
      failures++;
      $display("FAIL step counts rec=%0d cr=%0d", rec_steps - rs0, cr_steps - cs0);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check_c(24'h800000);
    check_c(24'hFFFFFF);
    check_c(24'hC00000);
    check_c(24'hE00000);
    for (int i = 0; i < 32; i++) begin
      check_c({1'b1, 5'(i), 18'h00000});
      check_c({1'b1, 5'(i), 18'h3FFFF});
    end
    for (int i = 0; i < 2000; i++)
      check_c({1'b1, 23'($urandom)});
    $display("max relative error %g", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
