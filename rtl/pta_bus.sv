// pta_bus -- a time-randomised shared bus with N contenders and rounds of L cycles.
//
// One instance is a cluster's intra-cluster bus ("ibus", contenders = cores)
// or the inter-cluster bus ("ebus", contenders = cluster switches).  A
// round_arbiter names the owner of every round.  In the first cycle of a round
// the bus grants the owner if the owner holds a request and the bus has
// nothing left to deliver; the request then occupies the bus for the L cycles
// of the round and is offered downstream in the round's last cycle.  A round
// whose owner has no request stays idle: no other contender may use it, which
// is what makes each contender's delay independent of the others' traffic.
// A request therefore waits (a) 0..L-1 cycles to reach a round boundary,
// (b) a number of whole rounds set by the arbitration policy (at most 2N-2
// for random permutations, N-1 for round robin), and (c) L cycles of transfer.
//
// Following the design: rounds, windows, policies and the L-cycle transfer.
// This design's choices: the valid/ready handshakes on both sides, moving a
// transaction as one struct rather than beat by beat, and the back-pressure
// rule (a delivery refused downstream is held, and rounds pass unused until it
// is taken; with the switch depths used in pta_multicore this never happens).
//
// Interface: contender i keeps req_valid_i[i] high and req_i[i] stable until
// req_ready_o[i] (the grant) is high in a cycle.  Downstream sees out_valid_o
// with out_o and takes it with out_ready_i.  Timing: grant in cycle t (a round
// start), out_valid_o first in cycle t+L-1.
module pta_bus
  import pta_bus_pkg::*;
#(
  parameter int unsigned N      = 4,
  parameter int unsigned L      = BUS_L_DEFAULT,
  parameter arb_policy_e POLICY = ARB_RANDPERM,
  parameter logic [31:0] SEED   = 32'h1234_5679,
  parameter int unsigned IDW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic           clk_i,
  input  logic           rst_ni,
  input  logic           seed_we_i,
  input  logic [31:0]    seed_i,
  // contenders
  input  logic [N-1:0]   req_valid_i,
  input  bus_req_t       req_i [N],
  output logic [N-1:0]   req_ready_o,
  // downstream
  output logic           out_valid_o,
  output bus_req_t       out_o,
  input  logic           out_ready_i,
  // observation
  output logic           round_start_o,
  output logic           window_start_o,
  output logic [IDW-1:0] owner_o,
  output logic           busy_o
);

  logic           round_last;
  logic [IDW-1:0] round_idx;
  logic [N*IDW-1:0] perm;

  round_arbiter #(.N(N), .L(L), .POLICY(POLICY), .SEED(SEED), .IDW(IDW)) u_arb (
    .clk_i, .rst_ni, .seed_we_i, .seed_i,
    .round_start_o, .round_last_o (round_last), .window_start_o,
    .owner_o, .round_idx_o (round_idx), .perm_o (perm)
  );

  bus_req_t xfer_q;
  logic     have_q;   // a transaction is on the bus
  logic     hold_q;   // its delivery was refused and is being held
  logic     deliver, grant;

  assign out_valid_o = have_q && (round_last || hold_q);
  assign out_o       = xfer_q;
  assign deliver     = out_valid_o && out_ready_i;
  assign grant       = round_start_o && req_valid_i[owner_o] && (!have_q || deliver);
  assign busy_o      = have_q;

  always_comb begin
    req_ready_o = '0;
    req_ready_o[owner_o] = grant;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      have_q <= 1'b0;
      hold_q <= 1'b0;
    end else begin
      if (grant)        have_q <= 1'b1;
      else if (deliver) have_q <= 1'b0;
      hold_q <= out_valid_o && !out_ready_i;
    end
  end

  always_ff @(posedge clk_i) begin
    if (grant) xfer_q <= req_i[owner_o];
  end

  // Handshake rules.
  for (genvar i = 0; i < N; i++) begin : g_chk
    a_req_hold: assert property (@(posedge clk_i) disable iff (!rst_ni)
      req_valid_i[i] && !req_ready_o[i] |=> req_valid_i[i] && $stable(req_i[i]));
  end
  a_grant_at_round_start: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (|req_ready_o) |-> round_start_o);
  a_one_grant: assert property (@(posedge clk_i) disable iff (!rst_ni) $onehot0(req_ready_o));

endmodule
