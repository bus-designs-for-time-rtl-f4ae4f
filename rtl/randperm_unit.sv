// randperm_unit -- permutation register for randomised-permutation arbitration.
//
// Holds the "randperm" register: N contender identifiers of log2(N) bits, one
// per round of an arbitration window (slot 0 is the first round).  When
// `update_i` is high the register is replaced by a reshuffled copy of itself.
// The reshuffle is the hierarchical swap network of the design: N-1 random
// bits ("randbits"); level 0 uses N/2 bits, each swapping the two ids of one
// adjacent pair; level 1 uses N/4 bits, each swapping two adjacent pairs; and so
// on until the last bit swaps the two halves.  With N = 4 and randbits
// b0,b1,b2: b0 swaps ids 0/1, b1 swaps ids 2/3, b2 swaps the two pairs, so
// 00-01-10-11 with randbits 1,0,1 becomes 10-11-01-00 (order 2,3,1,0).
// Every contender then lands in each slot with probability exactly 1/N, from
// log2(N) of the bits, whatever its previous slot.  Not all N! orders are
// reachable, which does not matter for a single contender's delay.
//
// Following the design: the register width, the number of random bits and the
// swap order for N = 4.  This design's choices: the generalisation of the
// swap order to N = 8, 16, ... (level by level, pairs first), the bit numbering
// of randbits (bit 0 is the first bit) and the reset value (identity order).
//
// Interface: perm_o[p*IDW +: IDW] is the id owning slot p.  The update is
// registered: the new permutation is visible the cycle after update_i.
module randperm_unit #(
  parameter int unsigned N   = 4,                 // contenders, a power of two >= 2
  parameter int unsigned IDW = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             update_i,
  input  logic [N-2:0]     randbits_i,
  output logic [N*IDW-1:0] perm_o
);

  localparam int unsigned LEVELS = $clog2(N);

  logic [IDW-1:0] perm_q [N];
  logic [IDW-1:0] stage  [LEVELS+1][N];

  // Swap network: at level k, slot p takes the id from slot p ^ 2^k when the
  // random bit of its 2^(k+1)-wide block is set.  Level k's bits start at
  // offset N - N/2^k in randbits.
  always_comb begin
    for (int p = 0; p < N; p++) stage[0][p] = perm_q[p];
    for (int k = 0; k < LEVELS; k++) begin
      for (int p = 0; p < N; p++) begin
        if (randbits_i[(N - (N >> k)) + (p >> (k + 1))])
          stage[k+1][p] = stage[k][p ^ (1 << k)];
        else
          stage[k+1][p] = stage[k][p];
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int p = 0; p < N; p++) perm_q[p] <= IDW'(p);
    end else if (update_i) begin
      for (int p = 0; p < N; p++) perm_q[p] <= stage[LEVELS][p];
    end
  end

  always_comb begin
    for (int p = 0; p < N; p++) perm_o[p*IDW +: IDW] = perm_q[p];
  end

  initial begin
    assert (N >= 2 && (N & (N - 1)) == 0)
      else $error("randperm_unit: N must be a power of two >= 2");
  end

endmodule
