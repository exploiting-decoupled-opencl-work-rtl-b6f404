// mersenne_twister: Mersenne-Twister uniform generator with an external
// update flag, for use inside an initiation-interval-one pipeline.
//
// The generator runs continuously: every cycle `rnd` shows the tempered
// value of the state word at the current index.  The state word is only
// written back, and the index only advanced, in a cycle where `update` is
// high.  A consumer that decides a value was not needed simply leaves
// `update` low and sees the same value again in the next cycle, so no
// random number is ever discarded and the uniform sequence stays intact.
// This flag-gated update is the adaptation the generator is built on; the
// recurrence and tempering themselves are the standard MT19937 ones
// (constants are the published MT19937 values, parameterised so that other
// members of the family can be configured).
//
// Seeding: a one-cycle `init` pulse loads `seed` and fills the N state
// words with the standard initialisation recurrence
// s[j] = INIT_MULT * (s[j-1] ^ (s[j-1] >> (W-2))) + j, one word per cycle;
// `ready` rises N cycles later.  `update` is ignored while not ready.
//
// Timing: `rnd` is combinational from the state array and index (read of
// three state words, twist, temper).  The state write and index increment
// happen on the rising clock edge when `update && ready`.
//
// Output choice: `rnd` tempers the freshly twisted word.  This makes the
// sequence identical to the reference MT19937 sequence for the same seed.
// The original adapted generator differs in two ways, and this design does
// not copy either:
//   - it tempers the word before the twist: the seeded state comes out
//     first, so the reference sequence is delayed by 624 words;
//   - it wraps its index at the last position even without an update.
module mersenne_twister #(
  parameter int          N         = 624,
  parameter int          M         = 397,
  parameter logic [31:0] MATRIX_A  = 32'h9908B0DF,
  parameter int          R         = 31,           // bits in the lower mask
  parameter int          TU        = 11,
  parameter int          TS        = 7,
  parameter logic [31:0] TB        = 32'h9D2C5680,
  parameter int          TT        = 15,
  parameter logic [31:0] TC        = 32'hEFC60000,
  parameter int          TL        = 18,
  parameter logic [31:0] INIT_MULT = 32'd1812433253
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic [31:0] seed,
  output logic        ready,
  input  logic        update,
  output logic [31:0] rnd
);
  localparam int IW = $clog2(N);
  localparam logic [31:0] LOWER = (32'd1 << R) - 32'd1;
  localparam logic [31:0] UPPER = ~LOWER;

  logic [31:0] st [N];
  logic [IW-1:0] idx, idx1, idxm;
  logic [31:0] y, twisted, t;

  // seeding
  logic          seeding;
  logic [IW-1:0] sidx;
  logic [31:0]   sprev;

  always_comb begin
    idx1 = (idx == IW'(N - 1)) ? '0 : idx + 1'b1;
    idxm = (32'(idx) + 32'(M) >= 32'(N)) ? IW'(32'(idx) + 32'(M) - 32'(N))
                                         : IW'(32'(idx) + 32'(M));
    y       = (st[idx] & UPPER) | (st[idx1] & LOWER);
    twisted = st[idxm] ^ (y >> 1) ^ (y[0] ? MATRIX_A : 32'd0);
    t = twisted;
    t = t ^ (t >> TU);
    t = t ^ ((t << TS) & TB);
    t = t ^ ((t << TT) & TC);
    t = t ^ (t >> TL);
    rnd = t;
  end

  logic [31:0] snext;
  assign snext = INIT_MULT * (sprev ^ (sprev >> 30)) + 32'(sidx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx     <= '0;
      ready   <= 1'b0;
      seeding <= 1'b0;
      sidx    <= '0;
      sprev   <= '0;
    end else if (init) begin
      idx     <= '0;
      ready   <= 1'b0;
      seeding <= 1'b1;
      sidx    <= IW'(1);
      sprev   <= seed;
    end else if (seeding) begin
      sprev <= snext;
      if (sidx == IW'(N - 1)) begin
        seeding <= 1'b0;
        ready   <= 1'b1;
      end else begin
        sidx <= sidx + 1'b1;
      end
    end else if (ready && update) begin
      idx <= idx1;
    end
  end

  // state array (single write port)
  always_ff @(posedge clk) begin
    if (init)                 st[0]    <= seed;
    else if (seeding)         st[sidx] <= snext;
    else if (ready && update) st[idx]  <= twisted;
  end

endmodule
