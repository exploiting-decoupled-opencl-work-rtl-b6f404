// work_item: one decoupled work-item.  A gamma generator (gamma_rng), its
// output stream (stream_fifo) and a transfer engine (transfer) run side by
// side as a small dataflow: the generator pushes validated values into
// the stream at up to one per cycle, and the transfer engine drains the
// stream into 512-bit bursts to device global memory.  A full stream
// blocks the generator; an empty stream blocks the transfer engine.  No
// state is shared with any other work-item, so data-dependent rejections
// in one work-item never hold up another.
//
// Interface: `start` launches both halves; the per-sector target of the
// generator is limit_rep*SXTRANSF values, so the two halves always agree
// on the amount of data.  `done` pulses when the last burst of this
// work-item has been written.  The request/grant/beat port goes to the
// shared memory channel (mem_arbiter).  `ev` exposes the generator's
// per-cycle events.
// The composition (generator, stream of depth 2048, transfer) follows the
// document; the MT seed of this work-item is seed + wid (own choice).
module work_item
  import gamma_pkg::*;
#(
  parameter int SXTRANSF   = 1024,
  parameter int FIFO_DEPTH = 2048,
  parameter bit USE_ICDF   = 1'b0,
  parameter int BREAK_ID   = 0,
  parameter int MT_N       = 624,
  parameter int MT_M       = 397
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [31:0]       wid,
  input  logic [31:0]       seed,
  input  fx_t               alpha,
  input  fx_t               beta,
  input  logic [31:0]       limit_sec,
  input  logic [31:0]       limit_rep,
  input  logic [31:0]       limit_max,
  input  logic [MEM_AW-1:0] base_addr,
  output logic              req,
  input  logic              gnt,
  output logic              m_valid,
  input  logic              m_ready,
  output mem_beat_t         m_beat,
  output logic              busy,
  output logic              done,
  output wi_events_t        ev
);
  logic        g_valid, g_ready, s_valid, s_ready;
  logic [31:0] g_data, s_data;
  logic        gen_busy, gen_done, tr_busy;
  logic [$clog2(FIFO_DEPTH+1)-1:0] level;
  logic [31:0] limit_main;

  assign limit_main = limit_rep * 32'(SXTRANSF);

  gamma_rng #(.USE_ICDF(USE_ICDF), .BREAK_ID(BREAK_ID), .MT_N(MT_N), .MT_M(MT_M)) u_gen (
    .clk, .rst_n, .start, .seed(seed + wid), .alpha, .beta,
    .limit_sec, .limit_main, .limit_max,
    .busy(gen_busy), .done(gen_done),
    .out_valid(g_valid), .out_ready(g_ready), .out_data(g_data), .ev);

  stream_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_stream (
    .clk, .rst_n, .wr_valid(g_valid), .wr_ready(g_ready), .wr_data(g_data),
    .rd_valid(s_valid), .rd_ready(s_ready), .rd_data(s_data), .level);

  transfer #(.SXTRANSF(SXTRANSF)) u_transfer (
    .clk, .rst_n, .start, .wid, .limit_sec, .limit_rep, .base_addr,
    .in_valid(s_valid), .in_ready(s_ready), .in_data(s_data),
    .req, .gnt, .m_valid, .m_ready, .m_beat, .busy(tr_busy), .done);

  assign busy = gen_busy || tr_busy;

  // the generator finishes no later than the transfer, leaving nothing behind
  a_gen_first: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> !gen_busy && level == '0);
  a_gen_done: assert property (@(posedge clk) disable iff (!rst_n)
    gen_done |-> tr_busy);
endmodule
