// tb_gamma_reject: feeds normal values (drawn in the testbench), uniform
// words and shape constants, and compares the accept flag and the
// candidate d*v two cycles later with a real-arithmetic evaluation of the
// Marsaglia-Tsang test.  Decisions within a small margin of the acceptance
// boundary are not compared.  Also checks in_ok propagation and a freeze.
module tb_gamma_reject;
  import gamma_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, in_valid = 0, in_ok = 0;
  fx_t x, d, c, g;
  logic [31:0] u1;
  logic out_valid, out_ok;
  int checks = 0, failures = 0, rej = 0, tot = 0;

  gamma_reject dut (.*);
  always #5 clk = ~clk;

  typedef struct { bit ok; bit border; real g; } exp_t;
  exp_t q[$];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic real gauss();
    real a, b;
    a = (real'($urandom_range(1, 32'hFFFFFF)) ) / 16777216.0;
    b = (real'($urandom_range(0, 32'hFFFFFF)) ) / 16777216.0;
    return $sqrt(-2.0 * $ln(a)) * $cos(6.283185307179586 * b);
  endfunction

  real dr, cr, xr, ur, v, lhs1, rhs2, m1, m2;
  exp_t e;
  real got;
  real alphas [3] = '{1.7194, 2.5, 11.0};
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    foreach (alphas[ai]) begin
      dr = alphas[ai] - 1.0/3.0;
      cr = 1.0 / $sqrt(9.0 * dr);
      d = fx_t'($rtoi(dr * 16777216.0));
      c = fx_t'($rtoi(cr * 16777216.0));
      dr = real'(d) / 16777216.0; cr = real'(c) / 16777216.0;
      for (int i = 0; i < 3000 || q.size() > 0; i++) begin
        en = ($urandom_range(0, 7) != 0);
        in_valid = (i < 3000);
        in_ok = ($urandom_range(0, 9) != 0);
        xr = (i % 700 == 5) ? -1.0 / cr - 0.5 : gauss();   // force v <= 0 now and then
        x = fx_t'($rtoi(xr * 16777216.0));
        xr = real'(x) / 16777216.0;
        u1 = $urandom();
        ur = real'({u1[31:9], 1'b1}) / 16777216.0;
        v = (1.0 + cr * xr) ** 3;
        if (1.0 + cr * xr <= 0.0) begin e.ok = 0; e.border = 0; e.g = 0; end
        else begin
          lhs1 = 1.0 - 0.0331 * xr**4;
          rhs2 = 0.5 * xr * xr + dr * (1.0 - v + $ln(v));
          m1 = ur - lhs1; m2 = $ln(ur) - rhs2;
          e.ok = in_ok && ((ur < lhs1) || ($ln(ur) < rhs2));
          e.border = (m1 < 1e-4 && m1 > -1e-4) || (m2 < 1e-4 && m2 > -1e-4);
          e.g = dr * v;
        end
        if (!in_ok) e.ok = 0;
        if (en && in_valid) q.push_back(e);
        @(posedge clk); #1;
        if (en && out_valid) begin
          e = q.pop_front();
          tot++;
          if (!e.border) check(out_ok == e.ok, $sformatf("accept flag %0d expected %0d", out_ok, e.ok));
          if (!out_ok) rej++;
          if (e.ok && out_ok) begin
            got = real'(g) / 16777216.0;
            check(got - e.g < 1e-4 * (1.0 + e.g) && e.g - got < 1e-4 * (1.0 + e.g),
                  $sformatf("g %f expected %f", got, e.g));
          end
        end
        if (i > 4000) break;
      end
      check(q.size() == 0, "pipeline drained");
    end
    $display("rejected (incl. in_ok=0) %0d of %0d", rej, tot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
