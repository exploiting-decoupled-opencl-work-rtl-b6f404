// tb_stream_fifo: random writes and reads against a queue model at the
// default depth; checks order, the full flag at exactly DEPTH entries, the
// empty flag, and the fill level.
module tb_stream_fifo;
  localparam int DEPTH = 2048;
  logic clk = 0, rst_n = 0, wr_valid = 0, wr_ready, rd_valid, rd_ready = 0;
  logic [31:0] wr_data, rd_data;
  logic [$clog2(DEPTH+1)-1:0] level;
  int checks = 0, failures = 0;
  logic [31:0] q[$];

  stream_fifo dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic cycle(input int pw, input int pr);
    wr_valid = ($urandom_range(0, 99) < pw);
    wr_data  = $urandom();
    rd_ready = ($urandom_range(0, 99) < pr);
    #1;
    check(rd_valid == (q.size() > 0), "rd_valid");
    check(wr_ready == (q.size() < DEPTH), "wr_ready");
    check(level == q.size(), "level");
    if (rd_valid) check(rd_data == q[0], $sformatf("rd_data %h expected %h", rd_data, q[0]));
    @(posedge clk);
    if (rd_valid && rd_ready) void'(q.pop_front());
    if (wr_valid && wr_ready) q.push_back(wr_data);
    #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) cycle(90, 10);    // fill up, hit full
    check(q.size() == DEPTH, "reached full");
    for (int i = 0; i < 3000; i++) cycle(50, 50);
    for (int i = 0; i < 4000; i++) cycle(10, 90);    // drain, hit empty
    check(q.size() == 0, "reached empty");
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
