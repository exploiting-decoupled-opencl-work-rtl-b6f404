// gamma_reject: Marsaglia-Tsang rejection step for gamma-distributed
// random numbers, two pipeline stages, one candidate per cycle.
//
// For shape parameter a (already raised by one when a <= 1, see
// gamma_correct) the caller supplies d = a - 1/3 and c = 1/sqrt(9d).
// Given a standard-normal x and a uniform u in (0,1):
//   v = (1 + c*x)^3, candidate g = d*v;
//   reject when v <= 0;
//   accept when u < 1 - 0.0331*x^4 (cheap squeeze), or else when
//   ln(u) < x^2/2 + d*(1 - v + ln v).
// Stage 1 forms 1 + c*x, x^2 and ln(u); stage 2 forms v, ln v, both tests
// and g.  `out_ok` is in_ok (the normal value itself was valid) AND the
// acceptance; it is the flag that gates the correction generator.
// `en` low freezes both stages.  All values are Q.24; g saturates at the
// top of the range.
// The algorithm is the one the generator is built on; the staging and the
// number format are this design's own.
module gamma_reject
  import gamma_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        in_valid,
  input  logic        in_ok,
  input  fx_t         x,
  input  logic [31:0] u1,
  input  fx_t         d,
  input  fx_t         c,
  output logic        out_valid,
  output logic        out_ok,
  output fx_t         g
);
  localparam logic signed [63:0] SQUEEZE = 64'sd555327;  // 0.0331 in Q.24

  // stage 1
  logic s1_valid, s1_ok;
  fx_t  s1_v1, s1_x2, s1_lnu, s1_u;
  fx_t  v1_c, u_c;
  always_comb begin
    v1_c = FX_ONE + fx_mul(c, x);
    u_c  = u32_to_unit(u1);
  end

  // stage 2
  logic signed [63:0] v_w, x4_w, lhs_sq, rhs_log;
  fx_t  v_c, lnv_c;
  logic accept_c;
  always_comb begin
    v_w    = (((64'(s1_v1) * 64'(s1_v1)) >>> FRAC) * 64'(s1_v1)) >>> FRAC;
    v_c    = fx_sat(v_w);
    lnv_c  = fx_ln((s1_v1 > 0) ? 32'(v_c) : 32'(FX_ONE));
    x4_w   = (64'(s1_x2) * 64'(s1_x2)) >>> FRAC;
    lhs_sq = 64'(FX_ONE) - ((x4_w * SQUEEZE) >>> FRAC);
    rhs_log = (64'(s1_x2) >>> 1)
            + ((64'(d) * (64'(FX_ONE) - v_w + 64'(lnv_c))) >>> FRAC);
    accept_c = (s1_v1 > 0) &&
               ((64'(s1_u) < lhs_sq) || (64'(s1_lnu) < rhs_log));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0; s1_ok <= 1'b0;
      s1_v1 <= '0; s1_x2 <= '0; s1_lnu <= '0; s1_u <= '0;
      out_valid <= 1'b0; out_ok <= 1'b0; g <= '0;
    end else if (en) begin
      s1_valid <= in_valid;
      s1_ok    <= in_valid && in_ok;
      s1_v1    <= v1_c;
      s1_x2    <= fx_mul(x, x);
      s1_lnu   <= fx_ln(32'(u_c));
      s1_u     <= u_c;
      out_valid <= s1_valid;
      out_ok    <= s1_ok && accept_c;
      g         <= fx_sat((64'(d) * v_w) >>> FRAC);
    end
  end
endmodule
