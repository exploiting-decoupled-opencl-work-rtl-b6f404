// tb_decoupled_work_items: end-to-end test of the kernel with every
// parameter at its default (6 work-items, 1024-value bursts, 2048-entry
// streams, MT19937), against a device-memory model.
// Three kernel runs:
//   A  sector variance 1.39 (shape < 1: correction path), 2 sectors of
//      2048 values per work-item, memory always ready: the run time must
//      follow the pipeline model t = values*(1+r) cycles (II = 1) plus
//      seeding and drain overhead;
//   B  variance 1.39, memory ready 1 cycle in 40, 4 bursts per work-item: streams fill up and the
//      generators block;
//   C  variance 0.4 (shape > 1: no correction), 1 sector of 1024 values.
// Each run checks: every word of the shared buffer written exactly once;
// each work-item's region holds exactly its generator's values in order;
// sample mean near 1 and variance near v (Gamma(1/v, v)).  Mechanisms
// counted over all runs, each must occur: polar rejection, Marsaglia-Tsang
// rejection, correction, uncorrected output, dropped in-flight values at
// the loop exit, stream-full stall, a work-item waiting for the shared
// channel, transfers overlapping computation, sector ends.
module tb_decoupled_work_items;
  import gamma_pkg::*;
  localparam int NW = 6, SX = 1024, LT = SX / 16;
  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] seed = 32'd2017, limit_sec, limit_rep, limit_max = 32'hFFFF_FFFF;
  fx_t alpha, beta;
  logic [MEM_AW-1:0] base_addr = 32'h1000;
  logic mem_valid, mem_ready = 1, busy, done;
  mem_beat_t mem_beat;
  wi_events_t ev [NW];
  int checks = 0, failures = 0;

  decoupled_work_items dut (.*);
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

  // stream taps of every work-item
  logic [31:0] produced [NW][$];
  for (genvar i = 0; i < NW; i++) begin : g_tap
    always @(posedge clk)
      if (dut.g_wi[i].u_wi.g_valid && dut.g_wi[i].u_wi.g_ready)
        produced[i].push_back(dut.g_wi[i].u_wi.g_data);
  end

  logic [MEM_DW-1:0] mem [int];
  int n_nrej, n_grej, n_corr, n_plain, n_disc, n_stall, n_wait, n_overlap, n_secend, n_issue, n_write;
  int cyc = 0, ndone = 0;
  always @(posedge clk) begin
    logic any_issue;
    cyc++;
    any_issue = 0;
    for (int i = 0; i < NW; i++) begin
      n_nrej  += int'(ev[i].normal_reject);
      n_grej  += int'(ev[i].gamma_reject);
      n_corr  += int'(ev[i].corrected);
      n_plain += int'(ev[i].write && !ev[i].corrected);
      n_disc  += int'(ev[i].discard);
      n_stall += int'(ev[i].stall);
      n_secend += int'(ev[i].sector_end);
      n_issue += int'(ev[i].issue);
      n_write += int'(ev[i].write);
      any_issue |= ev[i].issue;
      if (dut.req[i] && !dut.gnt[i] && dut.gnt != 0) n_wait++;
    end
    if (mem_valid && mem_ready) begin
      if (any_issue) n_overlap++;
      check(!mem.exists(int'(mem_beat.addr)), $sformatf("address %h written twice", mem_beat.addr));
      mem[int'(mem_beat.addr)] = mem_beat.data;
    end
    if (done) ndone++;
  end

  task automatic run(input real v, input int nsec, input int nrep, input int ready_1_in,
                     input bit check_time);
    int t0, cycles, words, region, issue0, write0;
    real sum, sum2, x, mean, variance, r;
    mem.delete();
    for (int i = 0; i < NW; i++) produced[i].delete();
    alpha = fx_t'($rtoi(16777216.0 / v));
    beta  = fx_t'($rtoi(16777216.0 * v));
    limit_sec = nsec; limit_rep = nrep;
    ndone = 0; issue0 = n_issue; write0 = n_write;
    @(negedge clk) start = 1; t0 = cyc; @(negedge clk) start = 0;
    while (ndone == 0) begin
      @(negedge clk);
      mem_ready = (ready_1_in <= 1) ? 1'b1 : ($urandom_range(1, ready_1_in) == 1);
    end
    cycles = cyc - t0;
    @(negedge clk);
    check(!busy, "idle after done");
    region = nsec * nrep * LT;
    words  = NW * region;
    check(mem.num() == words, $sformatf("%0d words written, expected %0d", mem.num(), words));
    sum = 0; sum2 = 0;
    for (int i = 0; i < NW; i++) begin
      check(produced[i].size() == region * 16, $sformatf("work-item %0d produced %0d", i, produced[i].size()));
      for (int w = 0; w < region; w++) begin
        if (!mem.exists(base_addr + i * region + w)) begin check(0, "word missing"); continue; end
        for (int j = 0; j < 16; j++) begin
          checks++;
          if (mem[base_addr + i * region + w][32*j +: 32] != produced[i][w*16 + j]) begin
            failures++;
            if (failures < 20) $display("FAIL: work-item %0d word %0d lane %0d", i, w, j);
          end
          x = f2r(produced[i][w*16 + j]);
          sum += x; sum2 += x * x;
        end
      end
    end
    mean = sum / (words * 16);
    variance = sum2 / (words * 16) - mean * mean;
    r = real'(n_issue - issue0) / real'(n_write - write0) - 1.0;
    $display("v=%0.2f: %0d cycles, mean %f, variance %f, combined rejection rate %f",
             v, cycles, mean, variance, r);
    check(mean > 0.95 && mean < 1.05, $sformatf("mean %f", mean));
    check(variance > 0.85 * v && variance < 1.15 * v, $sformatf("variance %f for v=%f", variance, v));
    if (check_time) begin
      // per work-item: values*(1+r) iterations at one per cycle, plus 624
      // seeding cycles and per-sector setup/drain, plus the last burst
      check(cycles >= int'(nsec * nrep * SX * (1.0 + r)) + 624,
            $sformatf("run time %0d below the II=1 bound", cycles));
      check(cycles <= int'(nsec * nrep * SX * (1.0 + r) * 1.01) + 624 + 20 * nsec + 2 * NW * (LT + 4),
            $sformatf("run time %0d above the II=1 model", cycles));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run(1.39, 2, 2, 1, 1);
    run(1.39, 1, 4, 40, 0);
    run(0.4, 1, 1, 1, 0);
    $display("events: polar rejects %0d, gamma rejects %0d, corrected %0d, uncorrected %0d, dropped %0d, stalls %0d, channel waits %0d, overlap %0d, sector ends %0d",
             n_nrej, n_grej, n_corr, n_plain, n_disc, n_stall, n_wait, n_overlap, n_secend);
    check(n_nrej > 0, "polar rejection occurred");
    check(n_grej > 0, "gamma rejection occurred");
    check(n_corr > 0, "correction occurred");
    check(n_plain > 0, "uncorrected output occurred");
    check(n_disc > 0, "in-flight values dropped at loop exit");
    check(n_stall > 0, "stream-full stall occurred");
    check(n_wait > 0, "a work-item waited for the memory channel");
    check(n_overlap > 0, "transfers overlapped computation");
    check(n_secend == NW * 4, $sformatf("%0d sector ends", n_secend));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
