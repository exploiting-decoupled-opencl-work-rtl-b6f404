// tb_mem_arbiter: four requesters issue bursts of random length with
// random gaps; the memory applies random back-pressure.  Checks that at
// most one requester is granted, that a grant lasts exactly one burst,
// that the beats reaching memory are the owner's in order, that a waiting
// requester is served within one round, and that all bursts complete.
module tb_mem_arbiter;
  import gamma_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt, s_valid, s_ready;
  mem_beat_t s_beat [N];
  logic mem_valid, mem_ready;
  mem_beat_t mem_beat;
  int checks = 0, failures = 0;

  mem_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int len [N], pos [N], done_b [N], wait_g [N], served_since [N];
  int prev_owner = -1, conflicts = 0;
  initial begin
    for (int i = 0; i < N; i++) begin len[i] = 0; pos[i] = 0; done_b[i] = 0; wait_g[i] = 0; end
    req = '0; s_valid = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        if (!req[i] && done_b[i] < 20 && $urandom_range(0, 9) == 0) begin
          req[i] = 1; len[i] = $urandom_range(1, 8); pos[i] = 0;
        end
        s_valid[i] = req[i] && gnt[i];
        s_beat[i].addr = 32'(i * 1000 + done_b[i] * 10 + pos[i]);
        s_beat[i].data = {16{32'(i * 7 + pos[i])}};
        s_beat[i].last = (pos[i] == len[i] - 1);
      end
      mem_ready = ($urandom_range(0, 2) != 0);
      #1;
      check($onehot0(gnt), "more than one grant");
      if ($countones(req) > 1 && gnt != 0) conflicts++;
      for (int i = 0; i < N; i++) begin
        if (req[i] && !gnt[i]) wait_g[i]++; else wait_g[i] = 0;
        if (req[i] && pos[i] > 0) check(gnt[i], $sformatf("grant of %0d dropped inside a burst", i));
        check(wait_g[i] < 8 * 12 + 10, $sformatf("requester %0d starved", i));
        if (gnt[i]) begin
          check(mem_valid == s_valid[i], "mem_valid from owner");
          check(mem_beat == s_beat[i], "beat from owner");
          check(s_ready[i] == mem_ready, "ready to owner");
        end else check(!s_ready[i], "ready to non-owner");
      end
      @(posedge clk);
      for (int i = 0; i < N; i++)
        if (s_valid[i] && s_ready[i]) begin
          if (s_beat[i].last) begin req[i] = 0; done_b[i]++; end
          else pos[i]++;
        end
    end
    for (int i = 0; i < N; i++) check(done_b[i] >= 20 || req[i], $sformatf("requester %0d finished %0d bursts", i, done_b[i]));
    check(conflicts > 0, "contention occurred");
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
