// decoupled_work_items: kernel top.  N_WI fully independent work-items,
// each a gamma random-number generator with its own stream and transfer
// engine, share a single 512-bit write channel to device global memory.
//
// Idea: on fixed SIMD-style architectures, work-items that take different
// sides of a data-dependent branch (here: whether a random candidate is
// rejected) idle while the others execute.  Here every work-item is its
// own hardware pipeline with an initiation interval of one iteration per
// cycle, so a rejection in one work-item costs that work-item one cycle
// and nothing else.  All work-items start together; their bursts to
// memory are serialised on the shared channel, after which the
// work-items drift apart in time and transfers overlap computation.
//
// Interface: kernel arguments (seed, alpha, beta in Q.24 fixed point,
// limit_sec, limit_rep, limit_max, base_addr) are sampled by the blocks
// while `start` is high and must stay stable until `done`.  Work-item i
// gets wid = i and writes limit_sec*limit_rep*SXTRANSF values starting at
// word base_addr + i*limit_sec*limit_rep*(SXTRANSF/16).  The memory port
// is a valid/ready stream of beats {addr, data, last}; addresses are in
// 512-bit words.  `done` pulses once all work-items have written their
// last burst.  `ev` gives each work-item's per-cycle events.
// Default N_WI = 6 is the work-item count of the configuration with the
// Marsaglia-Bray normal generator and MT19937; the kernel-argument style
// and the memory-port handshake are this design's own.
module decoupled_work_items
  import gamma_pkg::*;
#(
  parameter int N_WI       = 6,
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
  input  logic [31:0]       seed,
  input  fx_t               alpha,
  input  fx_t               beta,
  input  logic [31:0]       limit_sec,
  input  logic [31:0]       limit_rep,
  input  logic [31:0]       limit_max,
  input  logic [MEM_AW-1:0] base_addr,
  output logic              mem_valid,
  input  logic              mem_ready,
  output mem_beat_t         mem_beat,
  output logic              busy,
  output logic              done,
  output wi_events_t        ev [N_WI]
);
  logic [N_WI-1:0] req, gnt, s_valid, s_ready, wi_busy, wi_done, finished;
  mem_beat_t       s_beat [N_WI];

  for (genvar i = 0; i < N_WI; i++) begin : g_wi
    work_item #(.SXTRANSF(SXTRANSF), .FIFO_DEPTH(FIFO_DEPTH), .USE_ICDF(USE_ICDF), .BREAK_ID(BREAK_ID),
                .MT_N(MT_N), .MT_M(MT_M)) u_wi (
      .clk, .rst_n, .start, .wid(32'(i)), .seed, .alpha, .beta,
      .limit_sec, .limit_rep, .limit_max, .base_addr,
      .req(req[i]), .gnt(gnt[i]), .m_valid(s_valid[i]), .m_ready(s_ready[i]),
      .m_beat(s_beat[i]), .busy(wi_busy[i]), .done(wi_done[i]), .ev(ev[i]));
  end

  mem_arbiter #(.N(N_WI)) u_arb (
    .clk, .rst_n, .req, .gnt, .s_valid, .s_ready, .s_beat,
    .mem_valid, .mem_ready, .mem_beat);

  // kernel completion: every work-item has reported done
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      finished <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) finished <= '0;
      else if (&(finished | wi_done) && !(&finished)) begin
        finished <= '1;
        done     <= 1'b1;
      end else finished <= finished | wi_done;
    end
  end

  assign busy = |wi_busy;
endmodule
