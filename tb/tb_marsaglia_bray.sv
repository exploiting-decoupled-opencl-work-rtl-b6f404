// tb_marsaglia_bray: drives random uniform pairs, one per cycle, and
// compares accept flag and normal value, three cycles later, with a
// real-arithmetic evaluation of the polar method.  Also checks the early
// accept flag one cycle after input, a pipeline freeze, and that the
// accept rate is near pi/4.
module tb_marsaglia_bray;
  import gamma_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  logic [31:0] ua, ub;
  logic valid1, ok1, out_valid, out_ok;
  fx_t normal;
  int checks = 0, failures = 0, accepted = 0, total = 0;

  marsaglia_bray dut (.*);
  always #5 clk = ~clk;

  typedef struct { bit ok; real n; bit border; } exp_t;
  exp_t q[$];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic exp_t model(logic [31:0] a, logic [31:0] b);
    exp_t e;
    real u, v, s;
    u = real'(a[31:7]) / 16777216.0 - 1.0;
    v = real'(b[31:7]) / 16777216.0 - 1.0;
    s = u*u + v*v;
    e.ok = (s > 0.0) && (s < 1.0);
    e.border = (s > 0.999999) && (s < 1.000001);
    e.n = e.ok ? u * $sqrt(-2.0 * $ln(s) / s) : 0.0;
    return e;
  endfunction

  exp_t e;
  real got, tol;
  int lat;
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // latency check with a single accepted pair (u=0.5, v=0)
    ua = 32'hC000_0000; ub = 32'h8000_0000; in_valid = 1;
    @(posedge clk); #1 in_valid = 0;
    check(valid1 && ok1, "early accept flag one cycle after input");
    lat = 1;
    while (!out_valid && lat < 10) begin @(posedge clk); #1 lat++; end
    check(lat == 3, $sformatf("latency %0d, expected 3", lat));
    got = real'(normal) / 16777216.0;
    check(got > 0.5 * $sqrt(-2.0*$ln(0.25)/0.25) - 1e-4 && got < 0.5 * $sqrt(-2.0*$ln(0.25)/0.25) + 1e-4,
          $sformatf("normal(0.5,0) = %f", got));
    @(posedge clk); #1;
    // random stream with occasional freezes
    for (int i = 0; i < 4000 || q.size() > 0; i++) begin
      en = ($urandom_range(0, 9) != 0);
      if (i < 4000) begin
        ua = $urandom(); ub = $urandom();
        if (i % 500 == 7) ua = 32'h8000_0000;  // u = 0, v random
        in_valid = 1;
      end else in_valid = 0;
      if (en && in_valid) q.push_back(model(ua, ub));
      @(posedge clk); #1;
      if (en && out_valid) begin
        e = q.pop_front();
        total++;
        if (!e.border) check(out_ok == e.ok, "accept flag");
        if (out_ok && e.ok) begin
          accepted++;
          got = real'(normal) / 16777216.0;
          tol = 2e-4 + 2e-4 * (got < 0 ? -got : got);
          check(got - e.n < tol && e.n - got < tol, $sformatf("normal %f expected %f", got, e.n));
        end
      end
      if (i > 5000) break;
    end
    check(q.size() == 0, "all inputs came out");
    check(real'(accepted) / real'(total) > 0.76 && real'(accepted) / real'(total) < 0.81,
          $sformatf("accept rate %f", real'(accepted) / real'(total)));
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
