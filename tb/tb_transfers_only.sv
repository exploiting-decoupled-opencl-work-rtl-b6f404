// tb_transfers_only: the memory side of the kernel with the computation
// removed, as in the original work's transfers-only measurement.  Each
// work-item's stream is replaced by a dummy source that always has a value:
// lane j of word w of work-item i carries {i[7:0], (16*w + j)[23:0]}.
// For burst lengths of 128, 256, 512, 1024, 2048 and 4096 values, a set of
// 8 transfer engines and an 8-port mem_arbiter is built.  The burst length
// is the transfer parameter SXTRANSF.  Each set is run with 1, 2, 4, 6 and 8
// active work-items, the burst lengths and counts of the original
// measurement.  Each run moves TOT = 196608 values in total; the original
// moved about 2.5 GB.  That size is scaled down so the whole sweep simulates
// in seconds.
//   The device-memory model accepts a beat in 28% of cycles, at random.
// That is the original's measured 3.58 GB/s divided by 64 bytes per beat at
// 200 MHz.  This rate is this testbench's assumption: the RTL does not
// include the memory controller.
//   Checks for every run:
//   - every word of the buffer is written exactly once, at
//     base + wid*region + w, with the right data;
//   - every active engine raises done once;
//   - the run takes at least TOT/k cycles (each engine reads one value per
//     cycle) and at least words/0.28 * 0.9 cycles (memory rate);
//   - it takes at most the sum of both plus the burst overheads.
// The cycle counts are printed as a table.  With this memory model, one
// work-item is limited by its 1-value-per-cycle read.  It also stops
// reading while its own burst is in flight, so it needs about
// TOT + TOT/16/0.28 cycles, 1.22 times the read bound.  Six or more
// work-items are limited by the memory rate.  The original shows the same
// shape: about 3.9 s with one work-item and about 0.7 s with six or eight.
// The model has no per-burst DRAM latency, so short bursts cost little
// more here than long ones.
module tb_transfers_only;
  import gamma_pkg::*;
  localparam int NB = 6, NWM = 8, NK = 5, TOT = 196608, READY_PCT = 28;
  logic clk = 0, rst_n = 0;
  logic [MEM_AW-1:0] base_addr = 32'h0800;
  logic [31:0] limit_sec = 1, limit_rep;
  int active_b = -1, active_k = 0;
  logic start = 0;
  int checks = 0, failures = 0;
  int ndone = 0, n_wait = 0, n_handover = 0;
  logic [MEM_DW-1:0] mem [int];
  logic mem_ready = 0;
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  for (genvar b = 0; b < NB; b++) begin : g_bl
    localparam int BL = 128 << b;
    logic [NWM-1:0] req, gnt, m_valid, m_ready, busy, done, in_ready;
    logic [31:0] cnt [NWM];
    mem_beat_t m_beat [NWM];
    logic mv;
    mem_beat_t mb;
    logic [NWM-1:0] gnt_q;
    for (genvar i = 0; i < NWM; i++) begin : g_wi
      transfer #(.SXTRANSF(BL)) u_tr (
        .clk, .rst_n, .start(start && active_b == b && i < active_k), .wid(32'(i)),
        .limit_sec, .limit_rep, .base_addr,
        .in_valid(1'b1), .in_ready(in_ready[i]), .in_data({8'(i), cnt[i][23:0]}),
        .req(req[i]), .gnt(gnt[i]), .m_valid(m_valid[i]), .m_ready(m_ready[i]),
        .m_beat(m_beat[i]), .busy(busy[i]), .done(done[i]));
      always @(posedge clk)
        if (start) cnt[i] <= 0;
        else if (in_ready[i]) cnt[i] <= cnt[i] + 1;
    end
    mem_arbiter #(.N(NWM)) u_arb (
      .clk, .rst_n, .req, .gnt, .s_valid(m_valid), .s_ready(m_ready), .s_beat(m_beat),
      .mem_valid(mv), .mem_ready(mem_ready && active_b == b), .mem_beat(mb));
    always @(posedge clk) if (active_b == b) begin
      if (mv && mem_ready) begin
        check(!mem.exists(int'(mb.addr)), $sformatf("address %h written twice", mb.addr));
        mem[int'(mb.addr)] = mb.data;
      end
      for (int i = 0; i < NWM; i++) if (req[i] && !gnt[i] && gnt != 0) n_wait++;
      if (gnt != 0 && gnt_q != 0 && gnt != gnt_q) n_handover++;
      if (gnt != 0) gnt_q <= gnt;
      ndone += $countones(done);
    end
  end

  task automatic run(input int b, input int k, output int cycles);
    int bl, region, words, t0, nb;
    logic [31:0] exp_lane;
    bl = 128 << b;
    region = TOT / k / 16;
    words = TOT / 16;
    nb = TOT / bl;
    mem.delete();
    limit_rep = TOT / k / bl;
    ndone = 0;
    active_k = k;
    @(negedge clk) active_b = b; start = 1;
    @(negedge clk) start = 0;
    cycles = 0;
    while (ndone < k && cycles < 2000000) begin
      @(negedge clk);
      mem_ready = ($urandom_range(0, 99) < READY_PCT);
      cycles++;
    end
    mem_ready = 0;
    repeat (4) @(negedge clk);
    check(ndone == k, $sformatf("burst %0d, %0d work-items: %0d done pulses", bl, k, ndone));
    check(mem.num() == words, $sformatf("burst %0d, %0d work-items: %0d words", bl, k, mem.num()));
    for (int i = 0; i < k; i++)
      for (int w = 0; w < region; w++) begin
        if (!mem.exists(base_addr + i * region + w)) begin check(0, "word missing"); continue; end
        for (int j = 0; j < 16; j++) begin
          exp_lane = {8'(i), 24'(16 * w + j)};
          checks++;
          if (mem[base_addr + i * region + w][32*j +: 32] != exp_lane) begin
            failures++;
            if (failures < 20) $display("FAIL: burst %0d wid %0d word %0d lane %0d", bl, i, w, j);
          end
        end
      end
    check(cycles >= TOT / k, $sformatf("%0d cycles below the read-rate bound", cycles));
    check(cycles >= int'(words * 100.0 / READY_PCT * 0.9),
          $sformatf("%0d cycles below the memory-rate bound", cycles));
    check(cycles <= TOT / k + int'(words * 100.0 / READY_PCT * 1.1) + nb * 4 + bl / 16 * 4,
          $sformatf("%0d cycles above the model", cycles));
    active_b = -1;
  endtask

  initial begin
    int cyc [NB][NK];
    int ks [NK] = '{1, 2, 4, 6, 8};
    string line;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < NB; b++)
      for (int q = 0; q < NK; q++) run(b, ks[q], cyc[b][q]);
    $display("cycles for %0d values (memory ready %0d%% of cycles)", TOT, READY_PCT);
    $display("burst    1 wi    2 wi    4 wi    6 wi    8 wi");
    for (int b = 0; b < NB; b++) begin
      line = $sformatf("%5d", 128 << b);
      for (int q = 0; q < NK; q++) line = {line, $sformatf(" %7d", cyc[b][q])};
      $display("%s", line);
    end
    $display("channel waits %0d, grant hand-overs %0d", n_wait, n_handover);
    check(n_wait > 0, "work-items waited for the channel");
    check(n_handover > 0, "grant passed between work-items");
    // more work-items never make the transfer slower than the read-bound run
    for (int b = 0; b < NB; b++) check(cyc[b][NK-1] < cyc[b][0], "8 work-items faster than 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
