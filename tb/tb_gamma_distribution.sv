// tb_gamma_distribution: checks the distribution that one generator
// (gamma_rng with MT19937) produces for a range of sector variances v.
// The target is Gamma(shape 1/v, scale v), with mean 1 and variance v.
// Both normal generators are tested: the polar method (default) and the
// inverse CDF (USE_ICDF=1).  This is the validation the original work shows
// as histograms against a reference gamma generator, for v = 0.20 and 1.25.
// Here it is done numerically.
//   Each build runs one sector of NS values for each of v = 0.1, 0.2, 1.25,
//   1.39, 5 and 10.  The checks are:
//   - sample mean within 4 standard errors of 1, where the standard error
//     is sqrt(v/NS);
//   - sample variance within 4 standard errors of v, where the standard
//     error is v*sqrt((6v + 2)/NS), using excess kurtosis 6/shape = 6v;
//   - empirical CDF within 0.015 of the exact gamma CDF at 12 points from
//     0.01 to 4 times the mean; the 95% Kolmogorov bound for NS = 40000 is
//     0.0068.
// The exact CDF is the regularised lower incomplete gamma function P(a, x/v).
// It uses the series  P = x^a e^-x / Gamma(a+1) * sum_n x^n / ((a+1)...(a+n))
// for x < a+1, and the Lentz continued fraction of the upper tail otherwise.
// ln Gamma comes from the Lanczos approximation (g=7, 9 terms).
// v = 100 is not run: its shape 0.01 leaves most values below the
// resolution of the fixed-point format, and its tail exceeds the format's
// range (see README).
module tb_gamma_distribution;
  import gamma_pkg::*;
  localparam int NS = 40000;
  logic clk = 0, rst_n = 0, start = 0, busy, done, out_valid, out_ready = 1;
  logic [31:0] seed = 32'd31337, limit_sec = 1, limit_main = NS, limit_max = 32'hFFFF_FFFF, out_data;
  fx_t alpha, beta;
  wi_events_t ev;
  int checks = 0, failures = 0;

  // one generator per normal method; `icdf` selects which one runs
  logic icdf = 0;
  logic busy0, done0, ov0, busy1, done1, ov1;
  logic [31:0] od0, od1;
  wi_events_t ev0, ev1;
  gamma_rng #(.USE_ICDF(0)) dut_polar (.clk, .rst_n, .start(start && !icdf), .seed, .alpha, .beta,
    .limit_sec, .limit_main, .limit_max, .busy(busy0), .done(done0), .out_valid(ov0),
    .out_ready, .out_data(od0), .ev(ev0));
  gamma_rng #(.USE_ICDF(1)) dut_icdf (.clk, .rst_n, .start(start && icdf), .seed, .alpha, .beta,
    .limit_sec, .limit_main, .limit_max, .busy(busy1), .done(done1), .out_valid(ov1),
    .out_ready, .out_data(od1), .ev(ev1));
  assign busy = icdf ? busy1 : busy0;
  assign done = icdf ? done1 : done0;
  assign out_valid = icdf ? ov1 : ov0;
  assign out_data = icdf ? od1 : od0;
  assign ev = icdf ? ev1 : ev0;
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic real f2r(logic [31:0] f);
    real m;
    if (f[30:0] == 0) return 0.0;
    m = (1.0 + real'(f[22:0]) / 8388608.0) * (2.0 ** (real'(f[30:23]) - 127.0));
    return f[31] ? -m : m;
  endfunction

  function automatic real lgam(input real z);
    real c[9] = '{0.99999999999980993, 676.5203681218851, -1259.1392167224028,
                  771.32342877765313, -176.61502916214059, 12.507343278686905,
                  -0.13857109526572012, 9.9843695780195716e-6, 1.5056327351493116e-7};
    real s, t;
    z = z - 1.0;
    s = c[0];
    for (int i = 1; i < 9; i++) s += c[i] / (z + i);
    t = z + 7.5;
    return 0.5 * $ln(2.0 * 3.141592653589793) + (z + 0.5) * $ln(t) - t + $ln(s);
  endfunction

  function automatic real gamma_p(input real a, input real x);
    real sum, term, b, c, d, h, an, del;
    if (x <= 0.0) return 0.0;
    if (x < a + 1.0) begin
      term = 1.0 / a; sum = term;
      for (int n = 1; n < 1000; n++) begin
        term *= x / (a + n); sum += term;
        if (term < sum * 1e-14) break;
      end
      return sum * $exp(-x + a * $ln(x) - lgam(a));
    end
    b = x + 1.0 - a; c = 1e300; d = 1.0 / b; h = d;
    for (int i = 1; i < 1000; i++) begin
      an = -i * (i - a); b += 2.0;
      d = an * d + b; if (d < 1e-300 && d > -1e-300) d = 1e-300;
      c = b + an / c; if (c < 1e-300 && c > -1e-300) c = 1e-300;
      d = 1.0 / d; del = d * c; h *= del;
      if (del > 1.0 - 1e-14 && del < 1.0 + 1e-14) break;
    end
    return 1.0 - $exp(-x + a * $ln(x) - lgam(a)) * h;
  endfunction

  real samples[$];
  always @(posedge clk)
    if (out_valid && out_ready) samples.push_back(f2r(out_data));

  task automatic run(input real v);
    real pts[12] = '{0.01, 0.05, 0.1, 0.2, 0.4, 0.6, 0.8, 1.0, 1.4, 2.0, 3.0, 4.0};
    real sum, sum2, mean, variance, se_m, se_v, fe, fm, dmax;
    int below;
    samples.delete();
    alpha = fx_t'($rtoi(16777216.0 / v));
    beta  = fx_t'($rtoi(16777216.0 * v));
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    check(samples.size() == NS, $sformatf("v=%0.2f: %0d values", v, samples.size()));
    sum = 0; sum2 = 0;
    foreach (samples[i]) begin sum += samples[i]; sum2 += samples[i] * samples[i]; end
    mean = sum / NS;
    variance = sum2 / NS - mean * mean;
    se_m = $sqrt(v / NS);
    se_v = v * $sqrt((6.0 * v + 2.0) / NS);
    dmax = 0;
    foreach (pts[k]) begin
      below = 0;
      foreach (samples[i]) below += int'(samples[i] <= pts[k]);
      fe = real'(below) / NS;
      fm = gamma_p(1.0 / v, pts[k] / v);
      if (fe - fm > dmax) dmax = fe - fm;
      if (fm - fe > dmax) dmax = fm - fe;
      check(fe - fm < 0.015 && fm - fe < 0.015,
            $sformatf("v=%0.2f: CDF at %0.2f is %f, gamma CDF %f", v, pts[k], fe, fm));
    end
    $display("%s v=%0.2f: mean %f (se %f), variance %f (se %f), largest CDF deviation %f",
             icdf ? "icdf " : "polar", v, mean, se_m, variance, se_v, dmax);
    check(mean - 1.0 < 4.0 * se_m && 1.0 - mean < 4.0 * se_m, $sformatf("v=%0.2f: mean %f", v, mean));
    check(variance - v < 4.0 * se_v && v - variance < 4.0 * se_v,
          $sformatf("v=%0.2f: variance %f", v, variance));
  endtask

  initial begin
    // sanity of the reference itself: Gamma(1) is exponential
    check(gamma_p(1.0, 1.0) > 0.6321205 && gamma_p(1.0, 1.0) < 0.6321206, "reference P(1,1)");
    check(gamma_p(0.5, 2.0) > 0.9544997 && gamma_p(0.5, 2.0) < 0.9544998, "reference P(0.5,2)");
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int m = 0; m < 2; m++) begin
      icdf = m[0];
      run(0.1);
      run(0.2);
      run(1.25);
      run(1.39);
      run(5.0);
      run(10.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
