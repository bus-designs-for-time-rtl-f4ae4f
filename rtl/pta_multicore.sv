// pta_multicore -- hierarchical time-randomised bus network of a clustered multicore.
//
// N_CL clusters of N_CO cores.  Each cluster has an intra-cluster bus (ibus)
// shared by its cores and a switch onto the inter-cluster bus (ebus), which is
// shared by the cluster switches and leads to a fixed-latency memory
// controller.  A cache miss thus crosses ibus, switch and ebus in series, and
// its delay is the sum of three independent parts: ibus delay (N_CO
// contenders, L_I cycles per round), the switch's fixed S cycles, and ebus
// delay (N_CL contenders, L_E cycles per round), followed by the memory
// controller's fixed MC_LAT.  Both buses use the same arbitration policy
// (random permutations by default; lottery or round robin as options), each with its own
// PRNG.  The cores and their random-placement caches are outside this module:
// every core's miss port is brought out, as is the memory port.
//
// Following the design: the clustered topology (default 4 cores x 2
// clusters), the serial ibus-switch-ebus path, L_I = L_E = 8 and random
// permutation arbitration.  This design's choices: S = 1, MC_LAT = 16, the
// switch FIFO depth (one entry per core), the response path (a broadcast from
// the memory controller that every core filters by its id, outside the
// arbitrated buses) and the per-bus seed derivation (seed_i XOR a per-bus
// constant).
//
// Interface: core c (c = cluster*N_CO + local index) raises core_req_valid_i[c]
// with core_req_i[c] and holds them until core_req_ready_o[c]; the src field
// is overwritten with c.  At most one outstanding request per core is
// expected.  The response arrives as core_rsp_valid_o[c] with core_rsp_o.
// seed_we_i loads new seeds into all arbiters.  The status outputs show the
// round and window boundaries and round owners of every bus and the fill level
// of each switch, for monitoring and test.
module pta_multicore
  import pta_bus_pkg::*;
#(
  parameter int unsigned N_CO     = 4,             // cores per cluster
  parameter int unsigned N_CL     = 2,             // clusters
  parameter int unsigned L_I      = BUS_L_DEFAULT, // ibus round length
  parameter int unsigned L_E      = BUS_L_DEFAULT, // ebus round length
  parameter int unsigned S_LAT    = 1,             // switch latency
  parameter int unsigned MC_LAT   = 16,            // memory controller latency
  parameter int unsigned MC_DEPTH = 4,             // memory controller requests in flight
  parameter arb_policy_e POLICY   = ARB_RANDPERM,
  parameter int unsigned NC       = N_CO * N_CL,   // total cores (derived)
  parameter int unsigned IW_CO    = (N_CO > 1) ? $clog2(N_CO) : 1,     // ibus owner width
  parameter int unsigned IW_CL    = (N_CL > 1) ? $clog2(N_CL) : 1,     // ebus owner width
  parameter int unsigned LVL_W    = $clog2(N_CO + 1)                   // switch level width
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              seed_we_i,
  input  logic [31:0]       seed_i,
  // core miss ports
  input  logic [NC-1:0]     core_req_valid_i,
  input  bus_req_t          core_req_i [NC],
  output logic [NC-1:0]     core_req_ready_o,
  output logic [NC-1:0]     core_rsp_valid_o,
  output bus_rsp_t          core_rsp_o,
  // memory port
  output logic              mem_req_valid_o,
  output mem_req_t          mem_req_o,
  input  logic              mem_rsp_valid_i,
  input  logic [LINE_W-1:0] mem_rsp_rdata_i,
  // status
  output logic              mc_late_o,
  output logic [N_CL-1:0]   ibus_round_start_o,   // per cluster: first cycle of an ibus round
  output logic [N_CL-1:0]   ibus_window_start_o,  // per cluster: first cycle of an ibus window
  output logic [N_CL-1:0][IW_CO-1:0] ibus_owner_o, // per cluster: local index of the round owner
  output logic              ebus_round_start_o,
  output logic              ebus_window_start_o,
  output logic [IW_CL-1:0]  ebus_owner_o,         // cluster owning the ebus round
  output logic [N_CL-1:0][LVL_W-1:0] switch_level_o // per cluster: requests waiting in the switch
);

  logic [N_CL-1:0] sw_in_valid, sw_in_ready, sw_out_valid, sw_out_ready;
  logic [N_CL-1:0] ibus_busy;  // observation only
  logic            ebus_busy;  // observation only
  bus_req_t        sw_in [N_CL];
  bus_req_t        sw_out [N_CL];

  for (genvar cl = 0; cl < N_CL; cl++) begin : g_cluster
    bus_req_t reqs [N_CO];
    for (genvar co = 0; co < N_CO; co++) begin : g_core
      always_comb begin
        reqs[co]     = core_req_i[cl*N_CO + co];
        reqs[co].src = ID_W'(cl*N_CO + co);
      end
    end

    pta_bus #(
      .N(N_CO), .L(L_I), .POLICY(POLICY),
      .SEED(32'h9E37_79B9 * (cl + 1) + 32'h1)
    ) u_ibus (
      .clk_i, .rst_ni, .seed_we_i,
      .seed_i         (seed_i ^ (32'h9E37_79B9 * (cl + 1))),
      .req_valid_i    (core_req_valid_i[cl*N_CO +: N_CO]),
      .req_i          (reqs),
      .req_ready_o    (core_req_ready_o[cl*N_CO +: N_CO]),
      .out_valid_o    (sw_in_valid[cl]),
      .out_o          (sw_in[cl]),
      .out_ready_i    (sw_in_ready[cl]),
      .round_start_o  (ibus_round_start_o[cl]),
      .window_start_o (ibus_window_start_o[cl]),
      .owner_o        (ibus_owner_o[cl]),
      .busy_o         (ibus_busy[cl])
    );

    bus_switch #(.S(S_LAT), .DEPTH(N_CO)) u_switch (
      .clk_i, .rst_ni,
      .in_valid_i  (sw_in_valid[cl]),
      .in_i        (sw_in[cl]),
      .in_ready_o  (sw_in_ready[cl]),
      .out_valid_o (sw_out_valid[cl]),
      .out_o       (sw_out[cl]),
      .out_ready_i (sw_out_ready[cl]),
      .level_o     (switch_level_o[cl])
    );
  end

  logic     eb_valid, eb_ready;
  bus_req_t eb_out;

  pta_bus #(.N(N_CL), .L(L_E), .POLICY(POLICY), .SEED(32'h7F4A_7C15)) u_ebus (
    .clk_i, .rst_ni, .seed_we_i,
    .seed_i         (seed_i ^ 32'h7F4A_7C15),
    .req_valid_i    (sw_out_valid),
    .req_i          (sw_out),
    .req_ready_o    (sw_out_ready),
    .out_valid_o    (eb_valid),
    .out_o          (eb_out),
    .out_ready_i    (eb_ready),
    .round_start_o  (ebus_round_start_o),
    .window_start_o (ebus_window_start_o),
    .owner_o        (ebus_owner_o),
    .busy_o         (ebus_busy)
  );

  logic     mc_rsp_valid;
  bus_rsp_t mc_rsp;

  mem_ctrl #(.LAT(MC_LAT), .DEPTH(MC_DEPTH)) u_mc (
    .clk_i, .rst_ni,
    .req_valid_i     (eb_valid),
    .req_i           (eb_out),
    .req_ready_o     (eb_ready),
    .mem_req_valid_o,
    .mem_req_o,
    .mem_rsp_valid_i,
    .mem_rsp_rdata_i,
    .rsp_valid_o     (mc_rsp_valid),
    .rsp_o           (mc_rsp),
    .late_o          (mc_late_o)
  );

  // Response broadcast, filtered by core id.
  assign core_rsp_o = mc_rsp;
  always_comb begin
    for (int c = 0; c < NC; c++)
      core_rsp_valid_o[c] = mc_rsp_valid && (mc_rsp.src == ID_W'(c));
  end

  initial assert (NC <= (1 << ID_W)) else $error("pta_multicore: too many cores for ID_W");

endmodule
