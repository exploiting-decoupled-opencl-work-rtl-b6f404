// mem_arbiter: the single channel to device global memory shared by all
// work-items.  Only one work-item transfers at a time; the others keep
// computing, so after a while their transfers fall into different time
// slots and computation and transfers overlap.
//
// Arbitration is round-robin over the requesters (starting after the
// previous owner), one whole burst per grant: `gnt[i]` rises one cycle
// after the choice and stays high until the beat flagged `last` has been
// accepted by the memory; one idle cycle follows before the next grant.
// While granted, the owner's beats are passed to the memory port and the
// memory's ready is returned to the owner only.
// Serialising the transfers of all work-items on one channel follows the
// document; round-robin and the burst-level grant are this design's own.
module mem_arbiter
  import gamma_pkg::*;
#(
  parameter int N = 6
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt,
  input  logic [N-1:0] s_valid,
  output logic [N-1:0] s_ready,
  input  mem_beat_t  s_beat [N],
  output logic       mem_valid,
  input  logic       mem_ready,
  output mem_beat_t  mem_beat
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;
  logic          owned;
  logic [IW-1:0] owner, pick;
  logic          found;

  // next requester after the current owner
  always_comb begin
    pick  = owner;
    found = 1'b0;
    for (int j = 1; j <= N; j++) begin
      int unsigned cand;
      cand = (32'(owner) + 32'(j)) % 32'(N);
      if (!found && req[cand]) begin
        pick  = IW'(cand);
        found = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owned <= 1'b0;
      owner <= IW'(N - 1);
    end else if (!owned) begin
      if (found) begin
        owned <= 1'b1;
        owner <= pick;
      end
    end else if (mem_valid && mem_ready && mem_beat.last) begin
      owned <= 1'b0;
    end
  end

  always_comb begin
    gnt     = '0;
    s_ready = '0;
    if (owned) begin
      gnt[owner]     = 1'b1;
      s_ready[owner] = mem_ready;
    end
    mem_valid = owned && s_valid[owner];
    mem_beat  = s_beat[owner];
  end

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    mem_valid && !mem_ready |=> mem_valid && $stable(mem_beat));
endmodule
