// Iteration-count study of the cube root core.
//
// The number of Newton-Raphson steps trades latency against accuracy:
// latency = 9 + CR_ITER*(3*REC_ITER + 4) cycles. This testbench builds four
// cores, (REC_ITER, CR_ITER) = (1,1), (2,1) (the default), (3,1) and (2,2),
// feeds all of them the same random normal operands, checks every latency
// and checks that each configuration stays within its relative error bound
// against a real-arithmetic cube root. It prints the largest error seen per
// configuration.
module tb_cbrt_iterations;
  localparam int NCFG = 4;
  localparam int NOPS = 1500;
  localparam int unsigned REC[NCFG] = '{1, 2, 3, 2};
  localparam int unsigned CRI[NCFG] = '{1, 1, 1, 2};
  localparam real BOUND[NCFG] = '{5.0e-4, 2.0e-4, 2.0e-4, 1.0e-6};

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [31:0] x = '0;
  logic [NCFG-1:0] done;
  logic [31:0] result [NCFG];

  int checks = 0, failures = 0;
  real max_err[NCFG];

  always #5 clk = ~clk;

  for (genvar g = 0; g < NCFG; g++) begin : g_core
    logic busy, invalid, overflow, underflow;
    cbrt_fp32 #(.REC_ITER(REC[g]), .CR_ITER(CRI[g])) u_core (
      .clk, .rst_n, .start, .x,
      .busy, .done(done[g]), .result(result[g]),
      .invalid, .overflow, .underflow
    );
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fp32_to_real(input logic [31:0] b);
    real m;
    m = real'({1'b1, b[22:0]});
    return (b[31] ? -1.0 : 1.0) * m * (2.0 ** real'(int'(b[30:23]) - 150));
  endfunction

  initial begin
    for (int k = 0; k < NCFG; k++) max_err[k] = 0.0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NOPS; i++) begin
      logic [31:0] op;
      int cycles;
      int seen[NCFG];
      real ref_v, a;
      op = $urandom;
      if (op[30:23] == 8'h00 || op[30:23] == 8'hFF) op[30:23] = 8'h80;
      a = fp32_to_real(op);
      ref_v = ((a < 0.0) ? -a : a) ** (1.0 / 3.0);
      if (a < 0.0) ref_v = -ref_v;
      @(negedge clk);
      x = op;
      start = 1'b1;
      @(posedge clk);
      cycles = 1;
      @(negedge clk);
      start = 1'b0;
      for (int k = 0; k < NCFG; k++) seen[k] = 0;
      while (seen[NCFG-1] == 0 || seen[0] == 0 || seen[1] == 0 || seen[2] == 0) begin
        @(posedge clk);
        cycles++;
        @(negedge clk);
        for (int k = 0; k < NCFG; k++) begin
          if (done[k]) begin
            real err;
            seen[k] = cycles;
            err = (fp32_to_real(result[k]) - ref_v) / ref_v;
            if (err < 0.0) err = -err;
            if (err > max_err[k]) max_err[k] = err;
            checks++;
            if (err > BOUND[k] || result[k][31] != op[31] ||
                cycles != int'(9 + CRI[k] * (3 * REC[k] + 4))) begin
              failures++;
              $display("FAIL cfg (%0d,%0d) op=%h got %h err=%g cycles=%0d", REC[k], CRI[k],
                       op, result[k], err, cycles);
            end
          end
        end
        if (cycles > 60) break;
      end
    end
    for (int k = 0; k < NCFG; k++)
      $display("REC_ITER=%0d CR_ITER=%0d latency=%0d max relative error %g", REC[k], CRI[k],
               9 + CRI[k] * (3 * REC[k] + 4), max_err[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
