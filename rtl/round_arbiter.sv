// round_arbiter -- round/window timing and owner selection of a bus.
//
// Time on a bus is cut into arbitration rounds of L cycles (the longest any
// request needs on the bus), and rounds into windows of N rounds, N being the
// number of contenders.  Each round has exactly one owner, the only contender
// that may start a transfer, and only in the first cycle of the round; a
// request that appears later in a round waits for the next round boundary.
// The owner is chosen whether or not it has a request, so a contender's delay
// never depends on the traffic of the others (time composability).
//
//   ARB_RANDPERM  at every window boundary the randperm register is reshuffled
//                 with N-1 fresh random bits; slot r of the permutation owns
//                 round r of the window.  Every contender gets exactly one
//                 round per window, so a request waits at most 2N-2 rounds.
//   ARB_LOTTERY   at every round boundary log2(N) fresh random bits name the
//                 owner; the wait is unbounded but geometrically distributed.
//   ARB_RR        deterministic round robin: contender r owns round r of every
//                 window, so a request waits at most N-1 rounds.  Its timing
//                 analysis assumes that worst wait for every request.
//
// The policies, the round length and window length follow the design.  This
// design's choices: one idle cycle after reset in which the first permutation
// (or first lottery owner) is drawn, so that the first window is already
// random; the PRNG is shared by both uses and advanced only when consumed.
//
// With N = 1 (the inter-cluster bus of a single-cluster setup) the only
// contender owns every round; the round alignment and L-cycle transfer remain.
//
// Interface: round_start_o is high in cycle 0 of every round, round_last_o in
// cycle L-1, window_start_o in cycle 0 of round 0.  owner_o is valid and
// stable for the whole round.  perm_o shows the randperm register.
module round_arbiter
  import pta_bus_pkg::*;
#(
  parameter int unsigned N      = 4,              // contenders, a power of two (1 allowed)
  parameter int unsigned L      = BUS_L_DEFAULT,  // cycles per round
  parameter arb_policy_e POLICY = ARB_RANDPERM,
  parameter logic [31:0] SEED   = 32'h1234_5679,
  parameter int unsigned IDW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             seed_we_i,
  input  logic [31:0]      seed_i,
  output logic             round_start_o,
  output logic             round_last_o,
  output logic             window_start_o,
  output logic [IDW-1:0]   owner_o,
  output logic [IDW-1:0]   round_idx_o,
  output logic [N*IDW-1:0] perm_o
);

  localparam int unsigned CW = (L > 1) ? $clog2(L) : 1;

  logic            init_q;
  logic [CW-1:0]   cyc_q;
  logic [IDW-1:0]  rnd_q;
  logic [IDW-1:0]  lot_q;
  logic [31:0]     rnd_bits;
  logic            advance, window_last, perm_update, lot_draw, prng_next;

  assign advance        = !init_q;
  assign round_start_o  = advance && (cyc_q == '0);
  assign round_last_o   = advance && (cyc_q == CW'(L - 1));
  assign window_last    = round_last_o && (rnd_q == IDW'(N - 1));
  assign window_start_o = round_start_o && (rnd_q == '0);
  assign round_idx_o    = rnd_q;

  assign perm_update = (POLICY == ARB_RANDPERM) && (init_q || window_last);
  assign lot_draw    = (POLICY == ARB_LOTTERY)  && (init_q || round_last_o);
  assign prng_next   = perm_update || lot_draw;

  prng_xorshift #(.SEED(SEED)) u_prng (
    .clk_i, .rst_ni, .seed_we_i, .seed_i,
    .next_i (prng_next),
    .rnd_o  (rnd_bits)
  );

  if (N > 1) begin : g_perm
    randperm_unit #(.N(N), .IDW(IDW)) u_perm (
      .clk_i, .rst_ni,
      .update_i   (perm_update),
      .randbits_i (rnd_bits[N-2:0]),
      .perm_o     (perm_o)
    );
  end else begin : g_single
    // A single contender owns every round.
    assign perm_o = '0;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      init_q <= 1'b1;
      cyc_q  <= '0;
      rnd_q  <= '0;
      lot_q  <= '0;
    end else begin
      init_q <= 1'b0;
      if (lot_draw) lot_q <= rnd_bits[IDW-1:0];
      if (advance) begin
        if (round_last_o) begin
          cyc_q <= '0;
          rnd_q <= (rnd_q == IDW'(N - 1)) ? '0 : rnd_q + IDW'(1);
        end else begin
          cyc_q <= cyc_q + CW'(1);
        end
      end
    end
  end

  assign owner_o = (N == 1)               ? '0 :
                   (POLICY == ARB_RANDPERM) ? perm_o[rnd_q*IDW +: IDW] :
                   (POLICY == ARB_LOTTERY)  ? lot_q : rnd_q;

  initial begin
    assert (N >= 1 && N <= 32 && (N & (N - 1)) == 0)
      else $error("round_arbiter: N must be a power of two in 1..32");
    assert (L >= 1) else $error("round_arbiter: L must be at least 1");
    assert (POLICY inside {ARB_RANDPERM, ARB_LOTTERY, ARB_RR})
      else $error("round_arbiter: unknown POLICY");
  end

endmodule
