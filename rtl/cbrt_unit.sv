// Cube root unit: Newton-Raphson cube root of a fraction c in [0.5,1).
//
// On start the unit reads the seed CR0 of cbrt(c) from the cube root ROM,
// addressed by the five bits of c after its leading one, and the seed REC0 of
// 1/CR0 from the reciprocal ROM, addressed by the five bits of CR0 after its
// leading one. It then runs REC_ITER reciprocal steps (rec_block, three
// cycles each), refining y toward 1/x, followed by a cube root step
// (cr_block, four cycles) that forms x' = (2x + c*y^2)/3. This pair is
// repeated CR_ITER times. The two input multiplexers follow the published
// datapath: the reciprocal block takes REC0 while the step counter n0 is 0
// and the previous Y(n+1) after that; the cube root estimate is CR0 while n1
// is 0 and the previous X(n+1) after that. n0 is cleared at the start of
// every cube root iteration, so each one refines 1/x from REC0 again. Each
// block is started in the cycle its predecessor finishes, so there are no
// idle cycles between steps.
//
// Timing: start is sampled on a rising edge together with c; done is high
// for one cycle 1 + CR_ITER*(3*REC_ITER + 4) edges later (11 with the
// default two reciprocal steps and one cube root step), with rq valid from
// then until the next start. start is ignored while busy.
module cbrt_unit
  import cbrt_pkg::*;
#(
  parameter int unsigned REC_ITER = REC_ITER_DEFAULT,   // reciprocal steps
  parameter int unsigned CR_ITER  = CR_ITER_DEFAULT     // cube root steps
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [23:0] c,        // operand fraction, UQ0.24, c[23] = 1
  output logic        busy,
  output logic        done,
  output logic [31:0] rq        // cbrt(c), UQ0.32
);

  logic [23:0] cr0, rec0;
  logic [21:0] cr_word;
  logic [22:0] rec_word;

  cr_seed_rom  u_cr_rom  (.index(c[22:18]),   .word(cr_word),  .cr0(cr0));
  rec_seed_rom u_rec_rom (.index(cr0[22:18]), .word(rec_word), .rec0(rec0));

  logic        busy_q;
  logic        launch_q;            // first reciprocal step of a run
  logic [23:0] c_q;                 // operand fraction
  logic [23:0] x_q;                 // current cube root estimate
  logic [23:0] rec0_q;              // reciprocal seed
  logic [7:0]  n0_q;                // reciprocal steps done in this iteration
  logic [7:0]  n1_q;                // cube root steps done

  logic        rec_start, rec_done;
  logic [23:0] rec_x, rec_y, y_next;
  logic [31:0] y_next32;
  logic        cr_start, cr_done;
  logic [23:0] x_next;
  logic [31:0] x_next32;
  logic        more_rec, more_cr;

  always_comb begin
    more_rec  = (32'(n0_q) + 1 < REC_ITER);
    more_cr   = (32'(n1_q) + 1 < CR_ITER);
    rec_start = launch_q | (rec_done & more_rec) | (cr_done & more_cr);
    cr_start  = rec_done & ~more_rec;
    // y multiplexer: REC0 for the first step (n0 = 0), else Y(n+1).
    rec_y = (rec_done & more_rec) ? y_next : rec0_q;
    // x multiplexer: CR0 for the first iteration (n1 = 0), else X(n+1).
    rec_x = (cr_done & more_cr) ? x_next : x_q;
  end

  rec_block u_rec (
    .clk, .rst_n,
    .start   (rec_start),
    .x       (rec_x),
    .y       (rec_y),
    .done    (rec_done),
    .y_next  (y_next),
    .y_next32(y_next32)
  );

  cr_block u_cr (
    .clk, .rst_n,
    .start   (cr_start),
    .y32     (y_next32),
    .c       (c_q),
    .x       (x_q),
    .done    (cr_done),
    .x_next  (x_next),
    .x_next32(x_next32)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q   <= 1'b0;
      launch_q <= 1'b0;
      c_q      <= '0;
      x_q      <= '0;
      rec0_q   <= '0;
      n0_q     <= '0;
      n1_q     <= '0;
    end else begin
      launch_q <= 1'b0;
      if (start && !busy_q) begin
        busy_q   <= 1'b1;
        launch_q <= 1'b1;
        c_q      <= c;
        x_q      <= cr0;
        rec0_q   <= rec0;
        n0_q     <= '0;
        n1_q     <= '0;
      end
      if (rec_done)
        n0_q <= more_rec ? n0_q + 8'd1 : 8'd0;
      if (cr_done) begin
        n1_q <= n1_q + 8'd1;
        x_q  <= x_next;
        if (!more_cr)
          busy_q <= 1'b0;
      end
    end
  end

  assign busy = busy_q;
  assign done = cr_done & ~more_cr;
  assign rq   = x_next32;

  // Only one block of the unit runs at a time.
  a_one_block: assert property (@(posedge clk) disable iff (!rst_n)
                                !(rec_start && cr_start));

endmodule
