// prng_xorshift -- 32-bit xorshift pseudo-random number generator.
//
// Supplies the random bits the bus arbiters consume: the N-1 "randbits" that
// reshuffle the permutation register at every window boundary, or the log2(N)
// bits that pick a lottery winner every round.  The arbitration only needs some
// PRNG; the xorshift32 recurrence (x ^= x<<13; x ^= x>>17; x ^= x<<5) is this
// design's choice because every output bit depends on many state bits after
// one step, so consecutive draws are not simple shifts of each other.
//
// Interface: `rnd_o` shows the current state; it advances one step at the
// clock edge that sees `next_i` high.  Reset loads SEED; `seed_we_i` loads
// `seed_i` (so that each measurement run can start from a fresh seed) and has
// priority over `next_i`.  A zero seed is replaced by a fixed non-zero
// constant because zero is the one state xorshift never leaves.
module prng_xorshift #(
  parameter logic [31:0] SEED = 32'h2545_F491
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        seed_we_i,
  input  logic [31:0] seed_i,
  input  logic        next_i,
  output logic [31:0] rnd_o
);

  localparam logic [31:0] FALLBACK = 32'h2545_F491;

  logic [31:0] state_q, state_d, s1, s2;

  always_comb begin
    s1      = state_q ^ (state_q << 13);
    s2      = s1 ^ (s1 >> 17);
    state_d = s2 ^ (s2 << 5);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)        state_q <= (SEED == 32'd0) ? FALLBACK : SEED;
    else if (seed_we_i) state_q <= (seed_i == 32'd0) ? FALLBACK : seed_i;
    else if (next_i)    state_q <= state_d;
  end

  assign rnd_o = state_q;

  a_nonzero: assert property (@(posedge clk_i) disable iff (!rst_ni) state_q != 32'd0);

endmodule
