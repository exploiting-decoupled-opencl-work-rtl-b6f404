// tb_transfer: feeds a numbered stream of values with random gaps, grants
// the channel after random delays and applies random memory back-pressure.
// Every beat's address, data and last flag are compared with the expected
// packing (value n of the work-item in lane n%16 of word
// base + blockOffset*wid + n/16), the stream must not be read while a
// burst is pending, and the number of bursts and the done pulse are
// checked.
module tb_transfer;
  import gamma_pkg::*;
  localparam int SX = 1024, LT = SX / 16;
  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] wid = 3, limit_sec = 2, limit_rep = 2;
  logic [MEM_AW-1:0] base_addr = 32'h100;
  logic in_valid = 0, in_ready, req, gnt = 0, m_valid, m_ready = 0, busy, done;
  logic [31:0] in_data;
  mem_beat_t m_beat;
  int checks = 0, failures = 0;

  transfer dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int sent = 0, beats = 0, bursts = 0, donecnt = 0;
  int total;
  logic [31:0] offs;
  logic [MEM_DW-1:0] expw;
  initial begin
    total = limit_sec * limit_rep * SX;
    offs  = limit_sec * limit_rep * LT * wid;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    while (donecnt == 0) begin
      @(negedge clk);
      in_valid = (sent < total) && ($urandom_range(0, 3) != 0);
      in_data  = 32'(sent) * 32'h9E37 + 32'h55;
      gnt      = req && (gnt || $urandom_range(0, 4) == 0);
      m_ready  = ($urandom_range(0, 2) != 0);
      #1;
      if (req) check(!in_ready, "stream read while a burst is pending");
      @(posedge clk);
      if (in_valid && in_ready) sent++;
      if (m_valid && m_ready) begin
        for (int j = 0; j < 16; j++) expw[32*j +: 32] = 32'(beats * 16 + j) * 32'h9E37 + 32'h55;
        check(m_beat.addr == base_addr + offs + beats, $sformatf("beat %0d addr %h", beats, m_beat.addr));
        check(m_beat.data == expw, $sformatf("beat %0d data", beats));
        check(m_beat.last == ((beats % LT) == LT - 1), $sformatf("beat %0d last", beats));
        if (m_beat.last) begin bursts++; gnt = 0; end
        beats++;
      end
      #1 if (done) donecnt++;
    end
    check(bursts == limit_sec * limit_rep, $sformatf("%0d bursts", bursts));
    check(beats == total / 16, $sformatf("%0d beats", beats));
    check(!busy, "idle after done");
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
