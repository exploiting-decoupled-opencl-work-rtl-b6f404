// transfer: the memory half of one decoupled work-item.  It reads the
// work-item's stream of single-precision values, packs them sixteen at a
// time into 512-bit memory words, collects SXTRANSF values (LTRANSF =
// SXTRANSF/16 words) in a burst buffer, and writes the buffer to device
// global memory as one burst.
//
// Addressing (in 512-bit words): all work-items share one output buffer
// starting at `base_addr`.  Work-item `wid` owns the region starting at
// offset blockOffset*wid, blockOffset = limit_sec*limit_rep*LTRANSF, and
// fills it consecutively, LTRANSF words per burst, limit_rep bursts per
// sector, limit_sec sectors.  Value j of a group of sixteen occupies bits
// [32j+31:32j] of its word.
//
// Sequence: FILL (one value per cycle while the stream has data) ->
// REQ (raise `req`, wait for `gnt` from the shared channel) -> BURST
// (LTRANSF beats, `m_beat.last` on the final one; the grant is held by the
// arbiter until then) -> FILL again, until all bursts are written, then a
// one-cycle `done`.  The stream is not read during REQ and BURST: the
// generator keeps running into the stream buffer meanwhile, which is how
// computation and transfers of the work-items overlap.
// Packing to full-width words, bursts of fixed length and the per-work-item
// offset into one shared buffer follow the document; the burst length
// (1024 values) and the request/grant/beat handshake are this design's own.
module transfer
  import gamma_pkg::*;
#(
  parameter int SXTRANSF = 1024
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [31:0]        wid,
  input  logic [31:0]        limit_sec,
  input  logic [31:0]        limit_rep,
  input  logic [MEM_AW-1:0]  base_addr,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [31:0]        in_data,
  output logic               req,
  input  logic               gnt,
  output logic               m_valid,
  input  logic               m_ready,
  output mem_beat_t          m_beat,
  output logic               busy,
  output logic               done
);
  localparam int LANES   = FLOATS_PER_WORD;
  localparam int LTRANSF = SXTRANSF / LANES;
  localparam int LW      = (LTRANSF > 1) ? $clog2(LTRANSF) : 1;
  localparam int PW      = $clog2(SXTRANSF);

  typedef enum logic [1:0] {T_IDLE, T_FILL, T_REQ, T_BURST} tstate_t;
  tstate_t state;

  logic [MEM_DW-1:0] transf_buf [LTRANSF];
  logic [MEM_DW-1:0] pack;
  logic [3:0]        lane;
  logic [LW-1:0]     widx, beat;
  logic [PW-1:0]     path;
  logic [31:0]       rep, sec;
  logic [MEM_AW-1:0] offset;
  logic              take, beat_done;
  logic [MEM_DW-1:0] word_c;

  assign in_ready  = (state == T_FILL);
  assign take      = in_valid && in_ready;
  assign req       = (state == T_REQ) || (state == T_BURST);
  assign m_valid   = (state == T_BURST);
  assign beat_done = m_valid && m_ready;
  assign busy      = (state != T_IDLE);

  always_comb begin
    word_c = pack;
    word_c[32*lane +: 32] = in_data;
    m_beat.addr = base_addr + offset + MEM_AW'(beat);
    m_beat.data = transf_buf[beat];
    m_beat.last = (beat == LW'(LTRANSF - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= T_IDLE; pack <= '0; lane <= '0; widx <= '0; beat <= '0;
      path <= '0; rep <= '0; sec <= '0; offset <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        T_IDLE: if (start) begin
          offset <= MEM_AW'(limit_sec * limit_rep * 32'(LTRANSF) * wid);
          rep <= '0; sec <= '0; path <= '0; lane <= '0; widx <= '0;
          state <= T_FILL;
        end
        T_FILL: if (take) begin
          pack <= word_c;
          lane <= lane + 1'b1;
          if (lane == 4'(LANES - 1)) widx <= (widx == LW'(LTRANSF - 1)) ? '0 : widx + 1'b1;
          if (path == PW'(SXTRANSF - 1)) begin
            path  <= '0;
            beat  <= '0;
            state <= T_REQ;
          end else path <= path + 1'b1;
        end
        T_REQ: if (gnt) state <= T_BURST;
        T_BURST: if (beat_done) begin
          if (m_beat.last) begin
            offset <= offset + MEM_AW'(LTRANSF);
            if (rep == limit_rep - 1) begin
              rep <= '0;
              if (sec == limit_sec - 1) begin
                done  <= 1'b1;
                state <= T_IDLE;
              end else begin
                sec   <= sec + 1'b1;
                state <= T_FILL;
              end
            end else begin
              rep   <= rep + 1'b1;
              state <= T_FILL;
            end
          end else beat <= beat + 1'b1;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk)
    if (take && lane == 4'(LANES - 1)) transf_buf[widx] <= word_c;

  a_beat_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_valid && !m_ready |=> m_valid && $stable(m_beat));
  a_beat_granted: assert property (@(posedge clk) disable iff (!rst_n)
    m_valid |-> gnt);
endmodule
