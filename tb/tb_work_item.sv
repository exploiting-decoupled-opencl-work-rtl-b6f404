// tb_work_item: one work-item with a short burst (64 values) and a small
// stream (128 entries) against a memory model with a slow phase.  Checks
// that the region of this work-item is written exactly once, word by word,
// with the values in the order the generator produced them, that the
// generator was blocked by a full stream at some point, that the sample
// mean is near 1, and that done arrives with the work-item idle.
module tb_work_item;
  import gamma_pkg::*;
  localparam int SX = 64, LT = SX / 16;
  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] wid = 2, seed = 32'd99, limit_sec = 2, limit_rep = 3, limit_max = 32'hFFFF_FFFF;
  fx_t alpha, beta;
  logic [MEM_AW-1:0] base_addr = 32'h40;
  logic req, gnt = 0, m_valid, m_ready = 0, busy, done;
  mem_beat_t m_beat;
  wi_events_t ev;
  int checks = 0, failures = 0;

  work_item #(.SXTRANSF(SX), .FIFO_DEPTH(128)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [31:0] produced[$];
  logic [MEM_DW-1:0] mem [int];
  int stalls = 0, cyc = 0, ndone = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.g_valid && dut.g_ready) produced.push_back(dut.g_data);
    if (ev.stall) stalls++;
    if (m_valid && m_ready) begin
      check(!mem.exists(int'(m_beat.addr)), $sformatf("address %h written twice", m_beat.addr));
      mem[int'(m_beat.addr)] = m_beat.data;
    end
    if (done) ndone++;
  end

  int total_words, first;
  real sum;
  logic [31:0] f;
  initial begin
    alpha = fx_t'($rtoi(16777216.0 / 1.39));
    beta  = fx_t'($rtoi(16777216.0 * 1.39));
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    while (ndone == 0) begin
      @(negedge clk);
      gnt = req;
      m_ready = (cyc < 2500) ? ($urandom_range(0, 19) == 0) : 1'b1;
    end
    @(negedge clk);
    check(!busy, "idle after done");
    total_words = limit_sec * limit_rep * LT;
    first = base_addr + wid * total_words;
    check(mem.num() == total_words, $sformatf("%0d words written, expected %0d", mem.num(), total_words));
    check(produced.size() == total_words * 16, $sformatf("%0d values produced", produced.size()));
    sum = 0;
    for (int w = 0; w < total_words; w++) begin
      check(mem.exists(first + w), $sformatf("word %0d missing", w));
      for (int j = 0; j < 16; j++) begin
        f = mem[first + w][32*j +: 32];
        check(f == produced[w*16 + j], $sformatf("word %0d lane %0d", w, j));
        sum += (1.0 + real'(f[22:0]) / 8388608.0) * (2.0 ** (real'(f[30:23]) - 127.0)) * (f[30:0] != 0 ? 1.0 : 0.0);
      end
    end
    $display("mean %f, stalls %0d", sum / (total_words * 16), stalls);
    check(sum / (total_words * 16) > 0.85 && sum / (total_words * 16) < 1.15, "sample mean near 1");
    check(stalls > 0, "stream-full stall occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
