// tb_gamma_rng: end-to-end check of one work-item generator.
//  - every written value is compared with a sequential real-arithmetic
//    model of the loop (own MT19937 streams, polar method, Marsaglia-Tsang
//    test, correction, scaling) that consumes each uniform stream only when
//    its flag says so and runs exactly as many iterations as were issued;
//  - each sector writes exactly limit_main values;
//  - with the stream always ready the main loop issues one iteration per
//    cycle (II = 1);
//  - random stream back-pressure freezes the pipeline without loss;
//  - the combined rejection rate for sector variance 1.39 lies near 30%;
//  - sample mean and variance match Gamma(1/v, v): mean 1, variance v;
//  - the limit_max exit ends a sector early.
module tb_gamma_rng;
  import gamma_pkg::*;
  import tb_mt_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done, out_valid, out_ready = 1;
  logic [31:0] seed = 32'd777, limit_sec, limit_main, limit_max, out_data;
  fx_t alpha, beta;
  wi_events_t ev;
  int checks = 0, failures = 0;

  localparam bit ICDF = 1'b0;   // normal generator under test
  gamma_rng #(.USE_ICDF(ICDF)) dut (.*);
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

  // ---------------- reference model ----------------
  mt_model m0a, m0b, m1, m2;
  real ar, br, dr, cr;
  bit  aflag;
  real got_q[$];
  int  issues_sec, writes_sec, rej_n, rej_g, iss_tot, wr_tot, first_issue, last_issue, stalls;
  real sum, sum2;
  int  nsamp;

  function automatic real quantile(real p0);
    real p, t, x;
    p = p0 < 0.5 ? p0 : 1.0 - p0;
    t = $sqrt(-2.0 * $ln(p));
    x = t - (2.515517 + 0.802853 * t + 0.010328 * t * t) /
            (1.0 + 1.432788 * t + 0.189269 * t * t + 0.001308 * t * t * t);
    return p0 < 0.5 ? -x : x;
  endfunction

  task automatic model_sector(input int iters, input int lim);
    int cnt;
    real u, v, s, x, v3, uu, g, u2, expv, gotv;
    int unsigned a, b, w1;
    cnt = 0;
    for (int it = 0; it < iters; it++) begin
      a = m0a.next();
      if (ICDF) x = quantile(real'({a[31:9], 1'b1}) / 16777216.0);
      else begin
        b = m0b.next();
        u = real'(a >> 7) / 16777216.0 - 1.0;
        v = real'(b >> 7) / 16777216.0 - 1.0;
        s = u*u + v*v;
        if (!(s > 0.0 && s < 1.0)) begin void'(m1.peek()); continue; end
        x = u * $sqrt(-2.0 * $ln(s) / s);
      end
      w1 = m1.next();
      uu = real'({w1[31:9], 1'b1}) / 16777216.0;
      if (1.0 + cr * x <= 0.0) continue;
      v3 = (1.0 + cr * x) ** 3;
      if (!((uu < 1.0 - 0.0331 * x**4) || ($ln(uu) < 0.5*x*x + dr*(1.0 - v3 + $ln(v3))))) continue;
      g = dr * v3;
      w1 = m2.next();
      u2 = real'({w1[31:9], 1'b1}) / 16777216.0;
      if (aflag) g = g * (u2 ** (1.0 / ar));
      expv = g * br;
      if (cnt < lim) begin
        cnt++;
        if (got_q.size() == 0) begin check(0, "hardware wrote fewer values than the model"); continue; end
        gotv = got_q.pop_front();
        check(gotv - expv < 1e-3 * (1.0 + expv) && expv - gotv < 1e-3 * (1.0 + expv),
              $sformatf("value %f expected %f", gotv, expv));
      end
    end
    check(got_q.size() == 0, $sformatf("%0d unexpected extra values", got_q.size()));
    got_q.delete();
  endtask

  // monitor
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (ev.issue) begin
      issues_sec++; iss_tot++;
      if (first_issue < 0) first_issue = cyc;
      last_issue = cyc;
    end
    if (ev.normal_reject) rej_n++;
    if (ev.gamma_reject) rej_g++;
    if (ev.stall) stalls++;
    if (ev.write) begin
      got_q.push_back(f2r(out_data));
      writes_sec++; wr_tot++;
      sum += f2r(out_data); sum2 += f2r(out_data) ** 2; nsamp++;
    end
  end

  task automatic run_kernel(input real var_v, input int nsec, input int lim, input int lmax,
                            input bit backpressure, input bit check_ii);
    alpha = fx_t'($rtoi(16777216.0 / var_v));
    beta  = fx_t'($rtoi(16777216.0 * var_v));
    ar = real'(alpha) / 16777216.0; br = real'(beta) / 16777216.0;
    aflag = (ar <= 1.0);
    dr = real'(((aflag ? alpha + FX_ONE : alpha) - fx_t'(32'd5592405))) / 16777216.0;
    cr = 1.0 / (3.0 * $sqrt(dr));
    m0a = new(seed); m0b = new(seed ^ 32'h5851F42D);
    m1 = new(seed ^ 32'h2545F491); m2 = new(seed ^ 32'h9E3779B9);
    limit_sec = nsec; limit_main = lim; limit_max = lmax;
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    for (int sct = 0; sct < nsec; sct++) begin
      issues_sec = 0; writes_sec = 0; first_issue = -1;
      fork
        begin
          while (!ev.sector_end) begin
            @(negedge clk);
            if (backpressure) out_ready = ($urandom_range(0, 3) != 0);
          end
          @(negedge clk);
        end
      join
      out_ready = 1;
      check(writes_sec == ((lmax > 0 && lmax < lim) ? writes_sec : lim),
            $sformatf("sector %0d wrote %0d, expected %0d", sct, writes_sec, lim));
      if (lmax > 0 && lmax < lim) check(issues_sec == lmax, $sformatf("limit_max exit after %0d issues", issues_sec));
      if (check_ii) check(last_issue - first_issue == issues_sec - 1,
                          $sformatf("II: %0d issues over %0d cycles", issues_sec, last_issue - first_issue + 1));
      model_sector(issues_sec, lim);
    end
    while (busy) @(negedge clk);
  endtask

  real mean, variance, rr;
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // 1: sector variance 1.39 (shape < 1, correction active), no back-pressure
    sum = 0; sum2 = 0; nsamp = 0; rej_n = 0; rej_g = 0; iss_tot = 0; wr_tot = 0;
    run_kernel(1.39, 3, 2000, 32'hFFFF_FFFF, 0, 1);
    rr = real'(iss_tot) / real'(wr_tot) - 1.0;
    $display("combined rejection rate %f (normal rejects %0d, gamma rejects %0d)", rr, rej_n, rej_g);
    if (ICDF) begin
      check(rr > 0.0 && rr < 0.05, $sformatf("combined rejection rate %f", rr));
      check(rej_g > 0 && rej_n == 0, "only gamma rejections");
    end else begin
      check(rr > 0.26 && rr < 0.35, $sformatf("combined rejection rate %f", rr));
      check(rej_g > 0 && rej_n > 0, "both rejection kinds occurred");
    end
    mean = sum / nsamp; variance = sum2 / nsamp - mean * mean;
    $display("mean %f variance %f", mean, variance);
    check(mean > 0.94 && mean < 1.06, $sformatf("mean %f", mean));
    check(variance > 1.2 && variance < 1.6, $sformatf("variance %f", variance));
    // 2: variance 0.4 (shape > 1, no correction), with back-pressure
    stalls = 0;
    run_kernel(0.4, 2, 1500, 32'hFFFF_FFFF, 1, 0);
    check(stalls > 0, "back-pressure stalls occurred");
    // 3: limit_max exit
    run_kernel(1.39, 1, 1000, 600, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
