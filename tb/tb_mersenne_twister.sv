// tb_mersenne_twister: checks the flag-gated Mersenne-Twister.
// 1. Seed 5489 must give the published first MT19937 outputs.
// 2. With a random update pattern, the output must equal an independent
//    software model that advances only on updates, and must hold its value
//    in cycles without update.
// Also checks that seeding takes N cycles.
module tb_mersenne_twister;
  logic clk = 0, rst_n = 0, init = 0, update = 0, ready;
  logic [31:0] seed, rnd;
  int checks = 0, failures = 0;

  mersenne_twister dut (.clk, .rst_n, .init, .seed, .ready, .update, .rnd);

  always #5 clk = ~clk;

  // reference MT19937
  int unsigned mt [624];
  int mti;
  function automatic void ref_seed(int unsigned s);
    mt[0] = s;
    for (int i = 1; i < 624; i++) mt[i] = 1812433253 * (mt[i-1] ^ (mt[i-1] >> 30)) + i;
    mti = 624;
  endfunction
  function automatic int unsigned ref_next();
    int unsigned y;
    if (mti >= 624) begin
      for (int k = 0; k < 624; k++) begin
        y = (mt[k] & 32'h80000000) | (mt[(k+1)%624] & 32'h7fffffff);
        mt[k] = mt[(k+397)%624] ^ (y >> 1) ^ ((y & 1) ? 32'h9908b0df : 0);
      end
      mti = 0;
    end
    y = mt[mti++];
    y ^= (y >> 11);
    y ^= (y << 7) & 32'h9d2c5680;
    y ^= (y << 15) & 32'hefc60000;
    y ^= (y >> 18);
    return y;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_seed(input logic [31:0] s, output int cycles);
    seed = s; init = 1; @(posedge clk); #1 init = 0;
    cycles = 0;
    while (!ready) begin @(posedge clk); #1 cycles++; end
  endtask

  int unsigned known [5] = '{32'd3499211612, 32'd581869302, 32'd3890346734,
                             32'd3586334585, 32'd545404204};
  int cyc;
  int unsigned expv, held;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    do_seed(32'd5489, cyc);
    check(cyc == 623, $sformatf("seeding took %0d cycles after init, expected 623", cyc));
    for (int i = 0; i < 5; i++) begin
      check(rnd == known[i], $sformatf("output %0d = %0d, expected %0d", i, rnd, known[i]));
      update = 1; @(posedge clk); #1 update = 0;
    end
    // random gating against model
    do_seed(32'h1234ABCD, cyc);
    ref_seed(32'h1234ABCD);
    expv = ref_next();
    for (int i = 0; i < 3000; i++) begin
      check(rnd == expv, $sformatf("step %0d: rnd %h expected %h", i, rnd, expv));
      update = ($urandom_range(0, 2) != 0);
      held = rnd;
      @(posedge clk); #1;
      if (update) expv = ref_next();
      else check(rnd == held, "value changed without update");
      update = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
