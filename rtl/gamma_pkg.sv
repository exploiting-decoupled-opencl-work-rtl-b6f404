// gamma_pkg: types, constants and fixed-point arithmetic shared by the
// gamma random-number work-items.
//
// All real-valued quantities inside the generator pipeline use signed
// fixed point with FRAC = 24 fractional bits in a 32-bit word (range
// -128 .. +128, resolution 2^-24).  Intermediate products are formed in 64
// bits.  The elementary functions needed by the Marsaglia-Bray and
// Marsaglia-Tsang algorithms (natural logarithm, square root, exponential)
// are written here as combinational functions so that each pipeline stage
// can call them:
//   fx_ln   : normalise to m in [1,2) by the leading one, then
//             ln(m) = 2*atanh((m-1)/(m+1)) by an odd series up to t^9
//             (absolute error below 1e-6).
//   fx_sqrt : bit-serial (digit-by-digit) integer square root, unrolled.
//   fx_exp  : e^y = 2^(y*log2 e); the integer part becomes a shift, the
//             fraction goes through a Taylor series up to the 7th power.
//   fx_to_float : converts the result to IEEE-754 single precision
//             (truncating), the format in which results leave the
//             work-item and are packed 16 to a 512-bit memory word.
// The choice of fixed point instead of single-precision floating point is
// this design's own; the algorithms the functions serve are the ones the
// generator is built around.
package gamma_pkg;

  localparam int FRAC  = 24;
  localparam int FXW   = 32;
  typedef logic signed [FXW-1:0] fx_t;
  localparam fx_t FX_ONE = fx_t'(1 <<< FRAC);

  // Device-memory interface: 512-bit words (16 single-precision values).
  localparam int MEM_DW        = 512;
  localparam int FLOATS_PER_WORD = MEM_DW / 32;
  localparam int MEM_AW        = 32;

  typedef struct packed {
    logic [MEM_AW-1:0] addr;   // word (512-bit) address
    logic [MEM_DW-1:0] data;
    logic              last;   // last beat of a burst
  } mem_beat_t;

  // Per-cycle event flags of one work-item, for observation.
  typedef struct packed {
    logic issue;         // a main-loop iteration entered the pipeline
    logic normal_reject; // Marsaglia-Bray rejected its uniform pair
    logic gamma_reject;  // Marsaglia-Tsang rejected a candidate
    logic corrected;     // an accepted value went through the alpha<=1 correction
    logic discard;       // accepted value dropped: sector already complete
    logic write;         // value written to the stream
    logic stall;         // pipeline held because the stream was full
    logic sector_end;    // a sector (main loop) finished
    logic limit_max_exit;// main loop left by k reaching limit_max
  } wi_events_t;

  // Constants in Q.30 for the series evaluations.
  localparam longint LN2_Q30   = 64'd744261118;  // ln 2
  localparam longint LOG2E_Q24 = 64'd24204406;   // log2 e

  // Position of the most significant one (0 when v == 0).
  function automatic int unsigned msb_pos(input logic [31:0] v);
    int unsigned p;
    p = 0;
    for (int i = 0; i < 32; i++) if (v[i]) p = i;
    return p;
  endfunction

  // Signed fixed-point product, result in Q.24 (caller keeps the range).
  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b);
    return fx_t'(p >>> FRAC);
  endfunction

  // Saturate a 64-bit Q.24 value into the 32-bit fixed-point range.
  function automatic fx_t fx_sat(input logic signed [63:0] v);
    if (v > 64'sd2147483647)  return fx_t'(32'h7FFF_FFFF);
    if (v < -64'sd2147483648) return fx_t'(32'h8000_0000);
    return fx_t'(v);
  endfunction

  // Natural logarithm of a positive Q.24 value; x == 0 is treated as the
  // smallest positive value.
  function automatic fx_t fx_ln(input logic [31:0] x);
    int unsigned p;
    logic [31:0] xx;
    logic [31:0] m;          // Q1.31, in [1,2)
    logic signed [63:0] num, den, t, t2, poly, lnm, res;
    xx  = (x == 0) ? 32'd1 : x;
    p   = msb_pos(xx);
    m   = xx << (31 - p);
    num = 64'(m) - 64'sd2147483648;             // (m-1) in Q.31
    den = 64'(m) + 64'sd2147483648;             // (m+1) in Q.31
    t   = (num <<< 30) / den;                   // Q.30, 0 <= t < 1/3
    t2  = (t * t) >>> 30;
    poly = 64'sd119304647;                      // 1/9
    poly = 64'sd153391689 + ((poly * t2) >>> 30); // 1/7
    poly = 64'sd214748365 + ((poly * t2) >>> 30); // 1/5
    poly = 64'sd357913941 + ((poly * t2) >>> 30); // 1/3
    poly = 64'sd1073741824 + ((poly * t2) >>> 30);
    lnm  = ((t * poly) >>> 30) <<< 1;           // 2*atanh(t), Q.30
    res  = (64'(signed'(p)) - 64'sd24) * 64'(LN2_Q30) + lnm;
    return fx_t'(res >>> 6);
  endfunction

  // Square root of a non-negative Q.24 value.
  function automatic fx_t fx_sqrt(input logic [31:0] x);
    logic [63:0] op, res, one;
    op  = 64'(x) << FRAC;
    res = '0;
    one = 64'd1 << 62;
    for (int i = 0; i < 32; i++) begin
      if (op >= res + one) begin
        op  = op - (res + one);
        res = (res >> 1) + one;
      end else begin
        res = res >> 1;
      end
      one = one >> 2;
    end
    return fx_t'(res[31:0]);
  endfunction

  // e^y for y <= 0 given in Q.24 with 64-bit range (y > 0 gives 1.0).
  function automatic fx_t fx_exp(input logic signed [63:0] y);
    logic signed [63:0] yy, z, k, f, g, p, r;
    yy = (y > 0) ? 64'sd0 : y;
    if (yy < -(64'sd64 <<< FRAC)) yy = -(64'sd64 <<< FRAC);
    z = (yy * 64'(LOG2E_Q24)) >>> FRAC;         // Q.24, <= 0
    k = z >>> FRAC;                              // floor
    f = z - (k <<< FRAC);                        // [0,1) in Q.24
    g = (f * 64'(LN2_Q30)) >>> FRAC;            // Q.30, [0, ln2)
    p = 64'sd213044;                             // 1/7!
    p = 64'sd1491308   + ((p * g) >>> 30);       // 1/6!
    p = 64'sd8947849   + ((p * g) >>> 30);       // 1/5!
    p = 64'sd44739243  + ((p * g) >>> 30);       // 1/4!
    p = 64'sd178956971 + ((p * g) >>> 30);       // 1/3!
    p = 64'sd536870912 + ((p * g) >>> 30);       // 1/2!
    p = 64'sd1073741824 + ((p * g) >>> 30);      // 1/1!
    p = 64'sd1073741824 + ((p * g) >>> 30);      // 1/0!
    r = p >>> 6;                                 // Q.24, [1,2)
    if (-k > 30) return '0;
    return fx_t'(r >>> (-k));
  endfunction

  // Uniform in (0,1) from a 32-bit random word: the top 24 bits with the
  // least significant bit forced to one, so ln() is always defined.
  function automatic fx_t u32_to_unit(input logic [31:0] u);
    return fx_t'({8'd0, u[31:9], 1'b1});
  endfunction

  // Uniform in [-1,1) from a 32-bit random word (top 25 bits).
  function automatic fx_t u32_to_sym(input logic [31:0] u);
    return fx_t'({7'd0, u[31:7]}) - FX_ONE;
  endfunction

  // Signed Q.24 to IEEE-754 single precision, truncating.
  function automatic logic [31:0] fx_to_float(input fx_t x);
    logic        s;
    logic [31:0] mag, mant;
    int unsigned p;
    logic [7:0]  e;
    s   = x[FXW-1];
    mag = s ? 32'(-x) : 32'(x);
    if (mag == 0) return 32'd0;
    p = msb_pos(mag);
    e = 8'(p + 127 - FRAC);
    if (p >= 23) mant = mag >> (p - 23);
    else         mant = mag << (23 - p);
    return {s, e, mant[22:0]};
  endfunction

endpackage
