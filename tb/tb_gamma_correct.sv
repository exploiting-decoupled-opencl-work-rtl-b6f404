// tb_gamma_correct: compares the corrected and scaled gamma value, two
// enabled cycles after input, with beta * g * u^(1/alpha) evaluated in real
// arithmetic, for several shapes, with and without correction, and with
// random pipeline freezes.
module tb_gamma_correct;
  import gamma_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, in_valid = 0, in_ok = 0, apply = 0;
  fx_t g, inv_alpha, beta, gamma;
  logic [31:0] u2;
  logic out_valid, out_ok;
  int checks = 0, failures = 0;

  gamma_correct dut (.*);
  always #5 clk = ~clk;

  typedef struct { bit ok; real val; } exp_t;
  exp_t q[$];
  exp_t e;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  real alphas [4] = '{0.7194, 0.3, 0.9, 2.0};
  real ia, br, gr, ur, got, tol;
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    foreach (alphas[ai]) begin
      apply = (alphas[ai] <= 1.0);
      ia = 1.0 / alphas[ai];
      inv_alpha = fx_t'($rtoi(ia * 16777216.0)); ia = real'(inv_alpha) / 16777216.0;
      br = 1.0 / alphas[ai];
      beta = fx_t'($rtoi(br * 16777216.0)); br = real'(beta) / 16777216.0;
      for (int i = 0; i < 2000 || q.size() > 0; i++) begin
        en = ($urandom_range(0, 5) != 0);
        in_valid = (i < 2000);
        in_ok = $urandom_range(0, 1);
        g = fx_t'($urandom_range(0, 32'h0400_0000));  // 0 .. 4
        gr = real'(g) / 16777216.0;
        u2 = $urandom();
        ur = real'({u2[31:9], 1'b1}) / 16777216.0;
        e.ok = in_ok;
        e.val = br * (apply ? gr * (ur ** ia) : gr);
        if (en && in_valid) q.push_back(e);
        @(posedge clk); #1;
        if (en && out_valid) begin
          e = q.pop_front();
          check(out_ok == e.ok, "ok flag");
          got = real'(gamma) / 16777216.0;
          tol = 2e-5 + 1e-4 * e.val;
          check(got - e.val < tol && e.val - got < tol,
                $sformatf("alpha %f: %f expected %f", alphas[ai], got, e.val));
        end
        if (i > 3000) break;
      end
      check(q.size() == 0, "pipeline drained");
    end
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
