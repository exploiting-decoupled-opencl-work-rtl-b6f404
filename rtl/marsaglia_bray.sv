// marsaglia_bray: Marsaglia-Bray (polar) transformation of two uniform
// random words into one standard-normal value, as a three-stage pipeline
// accepting one pair per cycle.
//
// Stage 1: map the words to u, v in [-1,1) and form s = u^2 + v^2.  The
//          pair is accepted when 0 < s < 1.  The accept flag is available
//          registered after this first stage (`ok1`), which lets the caller
//          decide early whether the next uniform generator may advance.
// Stage 2: q = u / sqrt(s) and t = sqrt(-2 ln s).
// Stage 3: n = q * t.  The textbook form u * sqrt(-2 ln s / s) is
//          rearranged this way so that no intermediate leaves the
//          fixed-point range.
// Outputs: `out_valid` marks a pipeline slot holding an input from three
// cycles earlier, `out_ok` tells whether that pair was accepted, `normal`
// is the Q.24 result (meaningless when not ok).  `en` freezes the whole
// pipeline (all registers hold) when low.
// The polar method is the document's choice; the fixed-point mapping and
// the staging are this design's own.
module marsaglia_bray
  import gamma_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        in_valid,
  input  logic [31:0] ua,
  input  logic [31:0] ub,
  output logic        valid1,
  output logic        ok1,
  output logic        out_valid,
  output logic        out_ok,
  output fx_t         normal
);
  // stage 1
  fx_t u_c, v_c, s_c;
  logic signed [63:0] s_wide;
  always_comb begin
    u_c    = u32_to_sym(ua);
    v_c    = u32_to_sym(ub);
    s_wide = (64'(u_c) * 64'(u_c) + 64'(v_c) * 64'(v_c)) >>> FRAC;
    s_c    = fx_t'(s_wide);
  end

  fx_t  u1_r, s1_r;
  logic ok1_r;
  // stage 2
  fx_t  q2_r, t2_r;
  logic v2_r, ok2_r;
  fx_t  s_safe, r_c, lns_c, t_c, q_c;
  logic signed [63:0] q_wide;

  always_comb begin
    s_safe = ok1_r ? s1_r : FX_ONE;     // avoid ln(0) and division by 0
    r_c    = fx_sqrt(s_safe);
    lns_c  = fx_ln(s_safe);
    t_c    = fx_sqrt(32'(-(lns_c <<< 1)));
    q_wide = (64'(u1_r) <<< FRAC) / 64'(r_c);
    q_c    = fx_t'(q_wide);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid1 <= 1'b0; ok1_r <= 1'b0; u1_r <= '0; s1_r <= '0;
      v2_r <= 1'b0; ok2_r <= 1'b0; q2_r <= '0; t2_r <= '0;
      out_valid <= 1'b0; out_ok <= 1'b0; normal <= '0;
    end else if (en) begin
      valid1 <= in_valid;
      ok1_r  <= in_valid && (s_wide > 0) && (s_wide < 64'(FX_ONE));
      u1_r   <= u_c;
      s1_r   <= s_c;
      v2_r   <= valid1;
      ok2_r  <= ok1_r;
      q2_r   <= q_c;
      t2_r   <= t_c;
      out_valid <= v2_r;
      out_ok    <= ok2_r;
      normal    <= fx_mul(q2_r, t2_r);
    end
  end
  assign ok1 = ok1_r;
endmodule
