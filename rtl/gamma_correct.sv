// gamma_correct: shape correction and scaling of an accepted gamma value,
// two pipeline stages, one value per cycle.
//
// Marsaglia-Tsang needs a shape a > 1.  For a <= 1 the generator draws
// from Gamma(a+1) and corrects with a second uniform u in (0,1):
//   g' = g * u^(1/a) = g * exp(ln(u) / a).
// The result (corrected when `apply` is high, the uncorrected g otherwise)
// is multiplied by the scale parameter `beta`, giving Gamma(a, beta).
// Stage 1 forms ln(u) * (1/a) in 64-bit Q.24; stage 2 the exponential, the
// products and the saturation to the 32-bit range.  `inv_alpha` is 1/a
// in Q.24.  `en` low freezes both stages; `out_valid`/`out_ok` follow
// `in_valid`/`in_ok` by two enabled cycles.
// The correction rule follows the document; the scaling by beta, the
// number format and the staging are this design's own.
module gamma_correct
  import gamma_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        in_valid,
  input  logic        in_ok,
  input  fx_t         g,
  input  logic [31:0] u2,
  input  fx_t         inv_alpha,
  input  logic        apply,
  input  fx_t         beta,
  output logic        out_valid,
  output logic        out_ok,
  output fx_t         gamma
);
  logic s1_valid, s1_ok;
  fx_t  s1_g;
  logic signed [63:0] s1_y;
  fx_t  corr_c, gg_c;

  always_comb begin
    corr_c = fx_exp(s1_y);
    gg_c   = apply ? fx_sat((64'(s1_g) * 64'(corr_c)) >>> FRAC) : s1_g;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0; s1_ok <= 1'b0; s1_g <= '0; s1_y <= '0;
      out_valid <= 1'b0; out_ok <= 1'b0; gamma <= '0;
    end else if (en) begin
      s1_valid  <= in_valid;
      s1_ok     <= in_valid && in_ok;
      s1_g      <= g;
      s1_y      <= (64'(fx_ln(32'(u32_to_unit(u2)))) * 64'(inv_alpha)) >>> FRAC;
      out_valid <= s1_valid;
      out_ok    <= s1_ok;
      gamma     <= fx_sat((64'(gg_c) * 64'(beta)) >>> FRAC);
    end
  end
endmodule
