// End-to-end testbench of the binary32 cube root core.
//
// Drives directed operands (exact cubes, powers of two covering all three
// exponent remainders of both signs, extremes of the normal range, zeros,
// subnormals, infinities and NaNs) and random normal operands over the whole
// exponent range. Each result is compared with a real-arithmetic cube root
// computed here; finite results must have the right sign and lie within a
// relative error TOL of it, special results must match exactly. Every
// operation must complete exactly LATENCY cycles after start. The testbench
// also counts how often each mechanism of the datapath was exercised (each
// scaling constant, each exponent multiplexer input, each normalisation
// shift, rounding up and down, rounding carry-out, every special class, a
// start while busy) and fails if one never occurred.
module tb_cbrt_fp32;
  import cbrt_pkg::*;

  localparam int unsigned NRAND = 3000;

  // Parameters of the core under test and their consequences.
  localparam int unsigned REC_ITER = REC_ITER_DEFAULT;
  localparam int unsigned CR_ITER  = CR_ITER_DEFAULT;
  localparam int unsigned LATENCY  = 9 + CR_ITER * (3 * REC_ITER + 4);
  // One cube root step from a 5-bit seed leaves about 1e-4 relative error.
  localparam real TOL = 1.2e-4;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [31:0] x = '0;
  logic        busy, done, invalid, overflow, underflow;
  logic [31:0] result;

  int checks = 0;
  int failures = 0;
  real max_err = 0.0;

  cbrt_fp32 dut (.*);

  always #5 clk = ~clk;

  // Watchdog.
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------- mechanism counters
  int cnt_k[5];          // 1, cube2, cube4, recube2, recube4
  int cnt_pexp[3];       // n, ~n+1, ~n
  int cnt_norm[3];       // rQ' >= 1, in [0.5,1), below 0.5
  int cnt_round_up = 0, cnt_round_down = 0, cnt_round_carry = 0;
  int cnt_cls[5];
  int cnt_busy_start = 0;

  always @(posedge clk) begin
    if (dut.cu_done) begin
      if (dut.r_q == 0) cnt_k[0]++;
      else cnt_k[{dut.iexp_neg_q, dut.r_q[1]} + 1]++;
      if (!dut.iexp_neg_q) cnt_pexp[0]++;
      else if (dut.r_q == 0) cnt_pexp[1]++;
      else cnt_pexp[2]++;
    end
    if (dut.bv_q[5]) begin
      if (dut.rq_s_q[55]) cnt_norm[0]++;
      else if (dut.rq_s_q[54]) cnt_norm[1]++;
      else cnt_norm[2]++;
    end
    if (dut.bv_q[7] && dut.dec_q.cls == CLS_NORMAL) begin
      if (dut.add_one_q) cnt_round_up++; else cnt_round_down++;
      if (dut.add_one_q && dut.q7_q[31:8] == '1) cnt_round_carry++;
    end
  end

  // ---------------------------------------------------------- reference
  function automatic real fp32_to_real(input logic [31:0] b);
    int e;
    real m;
    e = int'(b[30:23]);
    m = real'({1'b1, b[22:0]});
    return (b[31] ? -1.0 : 1.0) * m * (2.0 ** real'(e - 150));
  endfunction

  function automatic real cbrt_ref(input real v);
    real a;
    a = (v < 0.0) ? -v : v;
    a = a ** (1.0 / 3.0);
    return (v < 0.0) ? -a : a;
  endfunction

  task automatic run_op(input logic [31:0] op, output logic [31:0] res,
                        output int cycles);
    @(negedge clk);
    x = op;
    start = 1'b1;
    @(posedge clk);
    cycles = 1;
    @(negedge clk);
    start = 1'b0;
    x = $urandom;
    while (!done) begin
      // A start while busy must be ignored.
      if (cycles == 5 && ($urandom % 8 == 0)) begin
        start = 1'b1;
        cnt_busy_start++;
      end
      @(posedge clk);
      cycles++;
      @(negedge clk);
      start = 1'b0;
    end
    res = result;
  endtask

  task automatic check_op(input logic [31:0] op);
    logic [31:0] res;
    logic [31:0] expect_bits;
    int cycles;
    real exp_v, got_v, err;
    logic special;
    run_op(op, res, cycles);
    checks++;
    if (cycles != LATENCY) begin
      failures++;
      $display("FAIL latency op=%h cycles=%0d expected %0d", op, cycles, LATENCY);
    end
    special = 1'b1;
    if (op[30:23] == 8'h00) begin
      expect_bits = {op[31], 31'd0};
      cnt_cls[0]++;
    end else if (op[30:23] == 8'hFF && op[22:0] == 0) begin
      expect_bits = {op[31], 8'hFF, 23'd0};
      cnt_cls[1]++;
    end else if (op[30:23] == 8'hFF && op[22]) begin
      expect_bits = op;
      cnt_cls[2]++;
    end else if (op[30:23] == 8'hFF) begin
      expect_bits = op | 32'h0040_0000;
      cnt_cls[3]++;
    end else begin
      special = 1'b0;
      expect_bits = '0;
      cnt_cls[4]++;
    end
    checks++;
    if (special) begin
      if (res !== expect_bits || invalid !== (op[30:23] == 8'hFF && op[22:0] != 0 && !op[22])) begin
        failures++;
        $display("FAIL special op=%h got %h expected %h invalid=%b", op, res, expect_bits, invalid);
      end
    end else begin
      exp_v = cbrt_ref(fp32_to_real(op));
      got_v = fp32_to_real(res);
      err = (got_v - exp_v) / exp_v;
      if (err < 0.0) err = -err;
      if (err > max_err) max_err = err;
      if (res[31] !== op[31] || res[30:23] == 8'h00 || res[30:23] == 8'hFF ||
          err > TOL || overflow || underflow || invalid) begin
        failures++;
        $display("FAIL op=%h (%g) got %h (%g) expected %g err=%g", op,
                 fp32_to_real(op), res, got_v, exp_v, err);
      end
    end
  endtask

  initial begin
    logic [31:0] op;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Directed operands.
    check_op(32'h3F80_0000);   // 1
    check_op(32'h4100_0000);   // 8
    check_op(32'h41D8_0000);   // 27
    check_op(32'hBE58_0000);   // -0.2109375
    check_op(32'h3E00_0000);   // 0.125
    check_op(32'h4000_0000);   // 2
    check_op(32'h4080_0000);   // 4
    check_op(32'h3F00_0000);   // 0.5
    check_op(32'h3E80_0000);   // 0.25
    check_op(32'h3F7F_FFFF);   // just below 1
    check_op(32'h7F7F_FFFF);   // largest normal
    check_op(32'h0080_0000);   // smallest normal
    check_op(32'hFF7F_FFFF);
    check_op(32'h0000_0000);   // +0
    check_op(32'h8000_0000);   // -0
    check_op(32'h0000_1234);   // subnormal, flushed
    check_op(32'h7F80_0000);   // +inf
    check_op(32'hFF80_0000);   // -inf
    check_op(32'h7FC0_0001);   // qNaN
    check_op(32'h7F80_0001);   // sNaN
    check_op(32'hFFA0_0000);   // sNaN, negative
    // Operands just above each power of two and three exponent remainders.
    for (int e = 1; e < 255; e++) begin
      check_op({1'b0, 8'(e), 23'd0});
      check_op({1'b1, 8'(e), 23'h7FFFFF});
    end
    // Random normal operands.
    for (int i = 0; i < NRAND; i++) begin
      op = $urandom;
      if (op[30:23] == 8'h00 || op[30:23] == 8'hFF) op[30:23] = 8'h7F;
      check_op(op);
    end
    // Mechanism coverage.
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (cnt_k[i] == 0) begin failures++; $display("FAIL scaling constant %0d never used", i); end
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (cnt_pexp[i] == 0) begin failures++; $display("FAIL Pexp' input %0d never used", i); end
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (cnt_norm[i] == 0) begin failures++; $display("FAIL normalisation case %0d never seen", i); end
    end
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (cnt_cls[i] == 0) begin failures++; $display("FAIL operand class %0d never seen", i); end
    end
    checks++;
    if (cnt_round_up == 0 || cnt_round_down == 0 || cnt_round_carry == 0 ||
        cnt_busy_start == 0) begin
      failures++;
      $display("FAIL rounding up/down/carry-out or busy start never seen");
    end
    $display("constants 1/cube2/cube4/recube2/recube4: %0d %0d %0d %0d %0d",
             cnt_k[0], cnt_k[1], cnt_k[2], cnt_k[3], cnt_k[4]);
    $display("Pexp' n/~n+1/~n: %0d %0d %0d", cnt_pexp[0], cnt_pexp[1], cnt_pexp[2]);
    $display("normalisation >=1 / [0.5,1) / <0.5: %0d %0d %0d", cnt_norm[0], cnt_norm[1], cnt_norm[2]);
    $display("rounding up %0d down %0d carry-out %0d; ignored starts %0d",
             cnt_round_up, cnt_round_down, cnt_round_carry, cnt_busy_start);
    $display("classes zero/inf/qnan/snan/normal: %0d %0d %0d %0d %0d",
             cnt_cls[0], cnt_cls[1], cnt_cls[2], cnt_cls[3], cnt_cls[4]);
    $display("max relative error %g", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
