// Binary32 floating-point cube root core (IEEE 754-2008 single precision).
//
// A normal operand X = (-1)^S * M * 2^Iexp, with M the 24-bit significand
// and Iexp = E - 127 - 23, has the cube root
//   cbrt(X) = (-1)^S * cbrt(M/2^24) * 2^8 * cbrt(2^Iexp),
// because M/2^24 lies in [0.5,1) and cbrt(2^24) = 2^8. Writing
// |Iexp| = 3n + r, cbrt(2^Iexp) is 2^(+-n) times cbrt(2^r) or its inverse.
// The core therefore (1) decodes the operand, (2) forms Iexp and |Iexp|,
// (3) looks up n and r in a division-by-three ROM, (4) starts the
// Newton-Raphson cube root unit on c = M/2^24, then (5) rescales its result by
// the constant for r, (6) normalises it and forms guard/round/sticky bits,
// (7) decides the rounding increment (round to nearest even), (8) adds it and
// forms the final exponent, and (9) encodes the binary32 result, replacing it
// by the special result for zero, infinity and NaN operands. Each of the nine
// steps takes one clock cycle; the iterations of the unit add
// CR_ITER*(3*REC_ITER + 4) cycles (its seed look-up shares cycle 4). With the
// default two reciprocal steps and one cube root step the latency is
// 9 + 10 = 19 cycles.
//
// The core is sequential: one operation at a time. start is sampled with x
// on a rising edge when busy is low; done is high for one cycle, 19 edges
// later with the defaults (start sampled at edge t, done seen at edge t+19),
// and result and the flags hold until the next done.
//
// The structure, the stage list, the ROM sizes and the cycle budget follow
// the published design; the fixed-point formats, the subnormal flush, the
// exponent bookkeeping of stages 6 and 8 and the handshake are this design's
// choices.
module cbrt_fp32
  import cbrt_pkg::*;
#(
  parameter int unsigned REC_ITER = REC_ITER_DEFAULT,   // reciprocal steps
  parameter int unsigned CR_ITER  = CR_ITER_DEFAULT     // cube root steps
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] x,          // operand, binary32
  output logic        busy,
  output logic        done,
  output logic [31:0] result,     // cube root, binary32
  output logic        invalid,    // signalling NaN operand
  output logic        overflow,
  output logic        underflow
);

  // ---------------------------------------------------------------- front end
  logic        busy_q;
  logic [3:1]  fv_q;                  // front-end stage valid bits
  fp_decoded_t dec, dec_q;
  logic signed [9:0] iexp;
  logic        iexp_neg, iexp_neg_q;
  logic [7:0]  rom_index, rom_index_q;
  logic [5:0]  n_rom, n_q;
  logic [1:0]  r_rom, r_q;

  fp_decoder u_dec (.x(x), .dec(dec));

  exp_index u_idx (
    .exp      (dec_q.exp),
    .iexp     (iexp),
    .iexp_neg (iexp_neg),
    .rom_index(rom_index)
  );

  exp_div3_rom u_div3 (.index(rom_index_q), .n(n_rom), .r(r_rom));

  // ------------------------------------------------------- cube root unit
  logic        cu_busy, cu_done;
  logic [31:0] rq;

  // Man' normalisation: the significand M read as a fraction is M/2^24.
  cbrt_unit #(.REC_ITER(REC_ITER), .CR_ITER(CR_ITER)) u_unit (
    .clk, .rst_n,
    .start(fv_q[3]),
    .c    (dec_q.man),
    .busy (cu_busy),
    .done (cu_done),
    .rq   (rq)
  );

  // ------------------------------------------------------------- back end
  logic [9:5]  bv_q;                  // back-end stage valid bits
  logic [55:0] rq_s, rq_s_q;
  logic signed [7:0] pexp_p, pexp_p_q;
  logic [31:0] q, q_q, q7_q;
  logic signed [7:0] pexp, pexp_q, pexp7_q;
  logic        lsb, guard, rnd, sticky;
  logic        lsb_q, guard_q, rnd_q, sticky_q;
  logic        add_one, add_one_q;
  logic [23:0] fcr, fcr_q;
  logic signed [9:0] fexp, fexp_q;
  logic [31:0] enc_result;
  logic        enc_invalid, enc_overflow, enc_underflow;

  cr_scale u_scale (
    .rq(rq), .r(r_q), .iexp_neg(iexp_neg_q), .pexp(n_q),
    .rq_s(rq_s), .pexp_p(pexp_p)
  );

  q_normalize u_norm (
    .rq_s(rq_s_q), .pexp_p(pexp_p_q), .r(r_q), .iexp_neg(iexp_neg_q),
    .q(q), .pexp(pexp), .lsb(lsb), .guard(guard), .round(rnd), .sticky(sticky)
  );

  fp_rounding u_round (
    .lsb(lsb_q), .guard(guard_q), .round(rnd_q), .sticky(sticky_q),
    .add_one(add_one)
  );

  q_update u_upd (.q(q7_q), .add_one(add_one_q), .pexp(pexp7_q),
                  .fcr(fcr), .fexp(fexp));

  fp_encoder u_enc (
    .sign(dec_q.sign), .cls(dec_q.cls), .nan_frac(dec_q.man[22:0]),
    .fcr(fcr_q), .fexp(fexp_q),
    .result(enc_result), .invalid(enc_invalid),
    .overflow(enc_overflow), .underflow(enc_underflow)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q      <= 1'b0;
      fv_q        <= '0;
      bv_q        <= '0;
      dec_q       <= '0;
      iexp_neg_q  <= 1'b0;
      rom_index_q <= '0;
      n_q         <= '0;
      r_q         <= '0;
      rq_s_q      <= '0;
      pexp_p_q    <= '0;
      q_q         <= '0;
      pexp_q      <= '0;
      {lsb_q, guard_q, rnd_q, sticky_q} <= '0;
      q7_q        <= '0;
      pexp7_q     <= '0;
      add_one_q   <= 1'b0;
      fcr_q       <= '0;
      fexp_q      <= '0;
      result      <= '0;
      invalid     <= 1'b0;
      overflow    <= 1'b0;
      underflow   <= 1'b0;
    end else begin
      fv_q <= {fv_q[2:1], start && !busy_q};
      bv_q <= {bv_q[8:5], cu_done};
      // 1: decoder and special cases
      if (start && !busy_q) begin
        busy_q <= 1'b1;
        dec_q  <= dec;
      end
      // 2: initial exponent and ROM index
      if (fv_q[1]) begin
        iexp_neg_q  <= iexp_neg;
        rom_index_q <= rom_index;
      end
      // 3: n & r from the division ROM, Pexp = n
      if (fv_q[2]) begin
        n_q <= n_rom;
        r_q <= r_rom;
      end
      // 4: normalised significand enters the cube root unit (fv_q[3])
      // 5: rescaling by cbrt(2^r) and Pexp' selection
      if (cu_done) begin
        rq_s_q   <= rq_s;
        pexp_p_q <= pexp_p;
      end
      // 6: normalisation of Q and LSB/G/R/STK
      if (bv_q[5]) begin
        q_q      <= q;
        pexp_q   <= pexp;
        {lsb_q, guard_q, rnd_q, sticky_q} <= {lsb, guard, rnd, sticky};
      end
      // 7: rounding decision
      if (bv_q[6]) begin
        add_one_q <= add_one;
        q7_q      <= q_q;
        pexp7_q   <= pexp_q;
      end
      // 8: Q and exponent update
      if (bv_q[7]) begin
        fcr_q  <= fcr;
        fexp_q <= fexp;
      end
      // 9: encoder and special cases
      if (bv_q[8]) begin
        result    <= enc_result;
        invalid   <= enc_invalid;
        overflow  <= enc_overflow;
        underflow <= enc_underflow;
        busy_q    <= 1'b0;
      end
    end
  end

  assign busy = busy_q;
  assign done = bv_q[9];

  // The unit is only started when idle.
  a_unit_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                fv_q[3] |-> !cu_busy);

endmodule
