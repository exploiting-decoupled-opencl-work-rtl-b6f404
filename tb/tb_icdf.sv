// tb_icdf: drives random uniform words (and a few extreme ones) one per
// cycle with random freezes.  Each output, three enabled cycles later, is
// checked two ways: against the quantile approximation evaluated in real
// arithmetic, and by mapping it back through the normal CDF (computed
// with an independent erf approximation) to the input probability.
module tb_icdf;
  import gamma_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  logic [31:0] u;
  logic valid1, ok1, out_valid, out_ok;
  fx_t normal;
  int checks = 0, failures = 0;

  icdf dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic real phi(real x);    // normal CDF via erf (A&S 7.1.26)
    real z, t, e;
    z = (x < 0 ? -x : x) / $sqrt(2.0);
    t = 1.0 / (1.0 + 0.3275911 * z);
    e = 1.0 - t * (0.254829592 + t * (-0.284496736 + t * (1.421413741 +
        t * (-1.453152027 + t * 1.061405429)))) * $exp(-z * z);
    return x < 0 ? 0.5 * (1.0 - e) : 0.5 * (1.0 + e);
  endfunction

  function automatic real model(real p0);
    real p, t, x;
    p = p0 < 0.5 ? p0 : 1.0 - p0;
    t = $sqrt(-2.0 * $ln(p));
    x = t - (2.515517 + 0.802853 * t + 0.010328 * t * t) /
            (1.0 + 1.432788 * t + 0.189269 * t * t + 0.001308 * t * t * t);
    return p0 < 0.5 ? -x : x;
  endfunction

  real q[$];
  real pr, got, e;
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 5000 || q.size() > 0; i++) begin
      en = ($urandom_range(0, 7) != 0);
      in_valid = (i < 5000);
      u = (i == 10) ? 32'd0 : (i == 11) ? 32'hFFFF_FFFF : (i == 12) ? 32'h8000_0000 : $urandom();
      pr = real'({u[31:9], 1'b1}) / 16777216.0;
      if (en && in_valid) q.push_back(pr);
      @(posedge clk); #1;
      if (en && out_valid) begin
        pr = q.pop_front();
        check(out_ok, "icdf never rejects");
        got = real'(normal) / 16777216.0;
        e = model(pr);
        check(got - e < 2e-4 && e - got < 2e-4, $sformatf("icdf(%f) = %f, model %f", pr, got, e));
        check(phi(got) - pr < 1e-3 && pr - phi(got) < 1e-3, $sformatf("Phi(%f) = %f, u %f", got, phi(got), pr));
      end
      if (i > 7000) break;
    end
    check(q.size() == 0, "all inputs came out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
