// icdf: inverse-cumulative-distribution transformation of one uniform
// random word into one standard-normal value, as a three-stage pipeline
// with the same port and timing as marsaglia_bray, so that either can
// serve as the normal generator of a work-item.
//
// Method (rational approximation of the normal quantile, absolute error
// below 4.5e-4): with p = min(u, 1-u) and t = sqrt(-2 ln p),
//   x = t - (c0 + c1 t + c2 t^2) / (1 + d1 t + d2 t^2 + d3 t^3),
//   c = 2.515517, 0.802853, 0.010328;  d = 1.432788, 0.189269, 0.001308,
// and the result is -x for u < 1/2, +x otherwise.
// Stage 1: u and p;  stage 2: t;  stage 3: the rational correction and
// the sign.  This transformation never rejects its input, so `ok1` and
// `out_ok` equal the valid flags.
// Only the function (uniform to normal by the inverse CDF) is taken from
// the document; the approximation, its fixed-point evaluation and the
// staging are this design's own.
module icdf
  import gamma_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        in_valid,
  input  logic [31:0] u,
  output logic        valid1,
  output logic        ok1,
  output logic        out_valid,
  output logic        out_ok,
  output fx_t         normal
);
  localparam logic signed [63:0] C0 = 64'sd42203372;   // 2.515517 in Q.24
  localparam logic signed [63:0] C1 = 64'sd13469638;   // 0.802853
  localparam logic signed [63:0] C2 = 64'sd173275;     // 0.010328
  localparam logic signed [63:0] D1 = 64'sd24038194;   // 1.432788
  localparam logic signed [63:0] D2 = 64'sd3175407;    // 0.189269
  localparam logic signed [63:0] D3 = 64'sd21945;      // 0.001308

  fx_t  u_c, p1_r, t2_r;
  logic neg1_r, neg2_r, v2_r;
  always_comb u_c = u32_to_unit(u);

  logic signed [63:0] t, t2, t3, num, den, x;
  always_comb begin
    t   = 64'(t2_r);
    t2  = (t * t) >>> FRAC;
    t3  = (t2 * t) >>> FRAC;
    num = C0 + ((C1 * t) >>> FRAC) + ((C2 * t2) >>> FRAC);
    den = 64'(FX_ONE) + ((D1 * t) >>> FRAC) + ((D2 * t2) >>> FRAC) + ((D3 * t3) >>> FRAC);
    x   = t - ((num <<< FRAC) / den);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid1 <= 1'b0; p1_r <= FX_ONE; neg1_r <= 1'b0;
      v2_r <= 1'b0; t2_r <= '0; neg2_r <= 1'b0;
      out_valid <= 1'b0; normal <= '0;
    end else if (en) begin
      valid1 <= in_valid;
      neg1_r <= (u_c < (FX_ONE >>> 1));
      p1_r   <= (u_c < (FX_ONE >>> 1)) ? u_c : FX_ONE - u_c;
      v2_r   <= valid1;
      neg2_r <= neg1_r;
      t2_r   <= fx_sqrt(32'(-(fx_ln(32'(p1_r)) <<< 1)));
      out_valid <= v2_r;
      normal    <= neg2_r ? -fx_t'(x) : fx_t'(x);
    end
  end
  assign ok1    = valid1;
  assign out_ok = out_valid;
endmodule
