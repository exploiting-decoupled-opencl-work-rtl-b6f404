// stream_fifo: the blocking stream between the generator and the transfer
// engine of one work-item.  A synchronous first-in first-out buffer of
// DEPTH words with valid/ready handshakes on both sides.
//
// Write side: a word is stored in a cycle with wr_valid && wr_ready;
// wr_ready is low while the buffer is full.  Read side: rd_valid is high
// while the buffer holds data and rd_data shows the oldest word
// (show-ahead, read combinationally from the array); it is removed in a
// cycle with rd_valid && rd_ready.  Both flags come from a registered fill
// count, so neither handshake depends combinationally on the other side.
// The default depth of 2048 single-precision values is the stream depth
// the work-items are built with; the handshake style is this design's own.
module stream_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 2048
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [WIDTH-1:0] wr_data,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [WIDTH-1:0] rd_data,
  output logic [$clog2(DEPTH+1)-1:0] level
);
  localparam int AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic do_wr, do_rd;

  assign wr_ready = (level != ($clog2(DEPTH+1))'(DEPTH));
  assign rd_valid = (level != '0);
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_valid && rd_ready;
  assign rd_data  = mem[rptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0; rptr <= '0; level <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   level <= level + 1'b1;
        2'b01:   level <= level - 1'b1;
        default: level <= level;
      endcase
    end
  end

  always_ff @(posedge clk) if (do_wr) mem[wptr] <= wr_data;
endmodule
