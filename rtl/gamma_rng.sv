// gamma_rng: the computation half of one decoupled work-item.  It produces
// gamma-distributed random numbers (Marsaglia-Tsang, fed by a Marsaglia-
// Bray normal generator and three uniform Mersenne-Twister streams) at an
// initiation interval of one main-loop iteration per clock cycle, and
// writes only validated values to an output stream as IEEE-754 floats.
//
// Loop structure (per `start`):
//   for sector in 0 .. limit_sec-1:              -- sector loop
//     set up d, c, 1/alpha and the alpha<=1 flag   (one cycle)
//     for k = 0; k < limit_max && prev_counter < limit_main; ++k
//       issue one iteration into the pipeline      -- main loop, II = 1
//     wait until the pipeline has drained
// An iteration that comes out accepted is written, and `counter`
// incremented, only while counter < limit_main.  The exit test reads
// `prev_counter`, a copy of `counter` delayed by BREAK_ID+1 cycles, so the
// loop condition never waits for the result of the iteration in flight;
// iterations issued after the target was reached are dropped at the
// output.  Each sector therefore writes exactly limit_main values unless
// limit_max is reached first.
//
// Random-number streams and their update flags: each Mersenne-Twister is
// read at the pipeline stage where its flag is known, so its sequence is
// exactly the one a sequential program would consume:
//   MT0a/MT0b (uniform pair for the polar method): advance every iteration;
//   MT1 (uniform for the rejection test): read one stage later, advances
//       only when the polar method accepted its pair;
//   MT2 (uniform for the correction): read after the rejection test,
//       advances only when the candidate was accepted.
// With USE_ICDF set, the polar method is replaced by the inverse-CDF
// transformation (icdf), which needs only MT0a and never rejects.
// Pipeline: issue -> marsaglia_bray or icdf (3) -> gamma_reject (2) ->
// gamma_correct (2) -> stream write, 7 cycles from issue to write.
//
// Stream handshake: `out_valid`/`out_ready`/`out_data`.  A write that
// cannot complete (out_ready low) freezes the whole pipeline, including
// the generators' updates, until it can: a blocking stream write.
//
// Parameters: alpha (shape) and beta (scale) in Q.24; setup derives
// d = a' - 1/3 and c = 1/(3 sqrt(d)) with a' = alpha+1 when alpha <= 1.
// The MTs are seeded from `seed` at every start (N cycles).  Splitting the
// uniform pair of the polar method over two generators, the seed
// derivation, the fixed-point format and the drain between sectors are
// this design's own choices; the loop structure, the flag-gated
// generators and the delayed exit counter follow the document.
module gamma_rng
  import gamma_pkg::*;
#(
  parameter bit USE_ICDF = 1'b0,
  parameter int BREAK_ID = 0,
  parameter int MT_N     = 624,
  parameter int MT_M     = 397
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] seed,
  input  fx_t         alpha,
  input  fx_t         beta,
  input  logic [31:0] limit_sec,
  input  logic [31:0] limit_main,
  input  logic [31:0] limit_max,
  output logic        busy,
  output logic        done,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_data,
  output wi_events_t  ev
);
  localparam int DRAIN_CYCLES = 8;
  localparam fx_t THIRD = fx_t'(32'd5592405);   // 1/3 in Q.24

  typedef enum logic [2:0] {S_IDLE, S_SEED, S_SETUP, S_RUN, S_DRAIN, S_FINISH} state_t;
  state_t state;

  logic        en, issue, loop_cond;
  logic [31:0] k, counter, sector;
  logic [31:0] prev_counter [BREAK_ID+1];
  logic [3:0]  drain_cnt;
  logic        mt_init;

  // sector constants
  logic alpha_flag;
  fx_t  d_r, c_r, inv_alpha_r;

  // ---------------- uniform generators ----------------
  logic [31:0] r0a, r0b, r1, r2;
  logic        rdy0a, rdy0b, rdy1, rdy2;
  logic        upd1, upd2;

  // ---------------- pipeline ----------------
  logic mb_valid1, mb_ok1, mb_valid, mb_ok;
  fx_t  mb_normal;
  logic [31:0] u1_d1, u1_d2;
  logic gr_valid, gr_ok;
  fx_t  gr_g;
  logic [1:0] ok_dly;        // marsaglia_bray ok aligned with gamma_reject output
  logic gc_valid, gc_ok;
  fx_t  gc_gamma;

  assign loop_cond = (k < limit_max) && (prev_counter[BREAK_ID] < limit_main);
  assign out_valid = gc_valid && gc_ok && (counter < limit_main) &&
                     (state == S_RUN || state == S_DRAIN);
  assign out_data  = fx_to_float(gc_gamma);
  assign en        = !(out_valid && !out_ready);
  assign issue     = (state == S_RUN) && en && loop_cond;
  assign upd1      = en && mb_valid1 && mb_ok1;
  assign upd2      = en && gr_valid && gr_ok;

  mersenne_twister #(.N(MT_N), .M(MT_M)) u_mt0a (.clk, .rst_n, .init(mt_init),
    .seed(seed), .ready(rdy0a), .update(issue), .rnd(r0a));
  mersenne_twister #(.N(MT_N), .M(MT_M)) u_mt1 (.clk, .rst_n, .init(mt_init),
    .seed(seed ^ 32'h2545F491), .ready(rdy1), .update(upd1), .rnd(r1));
  mersenne_twister #(.N(MT_N), .M(MT_M)) u_mt2 (.clk, .rst_n, .init(mt_init),
    .seed(seed ^ 32'h9E3779B9), .ready(rdy2), .update(upd2), .rnd(r2));

  // normal generator: Marsaglia-Bray (two uniforms) or ICDF (one uniform)
  if (USE_ICDF) begin : g_icdf
    assign rdy0b = 1'b1;
    assign r0b   = '0;
    icdf u_icdf (.clk, .rst_n, .en, .in_valid(issue), .u(r0a),
      .valid1(mb_valid1), .ok1(mb_ok1), .out_valid(mb_valid), .out_ok(mb_ok),
      .normal(mb_normal));
  end else begin : g_mbray
    mersenne_twister #(.N(MT_N), .M(MT_M)) u_mt0b (.clk, .rst_n, .init(mt_init),
      .seed(seed ^ 32'h5851F42D), .ready(rdy0b), .update(issue), .rnd(r0b));
    marsaglia_bray u_mb (.clk, .rst_n, .en, .in_valid(issue), .ua(r0a), .ub(r0b),
      .valid1(mb_valid1), .ok1(mb_ok1), .out_valid(mb_valid), .out_ok(mb_ok),
      .normal(mb_normal));
  end

  gamma_reject u_gr (.clk, .rst_n, .en, .in_valid(mb_valid), .in_ok(mb_ok),
    .x(mb_normal), .u1(u1_d2), .d(d_r), .c(c_r),
    .out_valid(gr_valid), .out_ok(gr_ok), .g(gr_g));

  gamma_correct u_gc (.clk, .rst_n, .en, .in_valid(gr_valid), .in_ok(gr_ok),
    .g(gr_g), .u2(r2), .inv_alpha(inv_alpha_r), .apply(alpha_flag), .beta(beta),
    .out_valid(gc_valid), .out_ok(gc_ok), .gamma(gc_gamma));

  // sector setup arithmetic
  fx_t aeff_c, d_c, sq_c;
  always_comb begin
    aeff_c = (alpha <= FX_ONE) ? alpha + FX_ONE : alpha;
    d_c    = aeff_c - THIRD;
    sq_c   = fx_sqrt(32'(d_c));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; k <= '0; counter <= '0; sector <= '0;
      for (int i = 0; i <= BREAK_ID; i++) prev_counter[i] <= '0;
      drain_cnt <= '0; mt_init <= 1'b0; done <= 1'b0;
      alpha_flag <= 1'b0; d_r <= '0; c_r <= '0; inv_alpha_r <= '0;
      u1_d1 <= '0; u1_d2 <= '0; ok_dly <= '0;
    end else begin
      mt_init <= 1'b0;
      done    <= 1'b0;
      if (en) begin
        u1_d1  <= r1;
        u1_d2  <= u1_d1;
        ok_dly <= {ok_dly[0], mb_ok};
        prev_counter[0] <= counter;
        for (int i = 1; i <= BREAK_ID; i++) prev_counter[i] <= prev_counter[i-1];
      end
      if (out_valid && out_ready) counter <= counter + 1'b1;
      case (state)
        S_IDLE: if (start) begin
          mt_init <= 1'b1;
          sector  <= '0;
          state   <= S_SEED;
        end
        S_SEED: if (!mt_init && rdy0a && rdy0b && rdy1 && rdy2) state <= S_SETUP;
        S_SETUP: begin
          alpha_flag  <= (alpha <= FX_ONE);
          d_r         <= d_c;
          c_r         <= fx_sat((64'(FX_ONE) <<< FRAC) / (64'(sq_c) * 64'sd3));
          inv_alpha_r <= fx_sat((64'(FX_ONE) <<< FRAC) / 64'(alpha));
          k       <= '0;
          counter <= '0;
          for (int i = 0; i <= BREAK_ID; i++) prev_counter[i] <= '0;
          state   <= S_RUN;
        end
        S_RUN: if (en) begin
          if (loop_cond) k <= k + 1'b1;
          else begin
            drain_cnt <= '0;
            state     <= S_DRAIN;
          end
        end
        S_DRAIN: if (en) begin
          drain_cnt <= drain_cnt + 1'b1;
          if (drain_cnt == 4'(DRAIN_CYCLES - 1)) begin
            if (sector + 1 >= limit_sec) state <= S_FINISH;
            else begin
              sector <= sector + 1'b1;
              state  <= S_SETUP;
            end
          end
        end
        S_FINISH: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  always_comb begin
    ev = '0;
    ev.issue          = issue;
    ev.normal_reject  = en && mb_valid1 && !mb_ok1;
    ev.gamma_reject   = en && gr_valid && ok_dly[1] && !gr_ok;
    ev.corrected      = out_valid && out_ready && alpha_flag;
    ev.discard        = en && gc_valid && gc_ok && (counter >= limit_main);
    ev.write          = out_valid && out_ready;
    ev.stall          = out_valid && !out_ready;
    ev.sector_end     = (state == S_DRAIN) && en && (drain_cnt == 4'(DRAIN_CYCLES - 1));
    ev.limit_max_exit = (state == S_RUN) && en && !(k < limit_max);
  end

  // blocking stream write: a pending value stays put until accepted
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));
endmodule
