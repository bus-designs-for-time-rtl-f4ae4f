// bus_switch -- cluster switch between an intra-cluster bus and the inter-cluster bus.
//
// Every transaction the cluster's ibus delivers crosses the switch in a fixed
// S cycles and then waits, in arrival order, to be granted by the ebus, on
// which the switch is one contender.  The fixed latency follows the design,
// which composes bus, switch and bus delays in series.  The FIFO between the
// delay line and the ebus is this design's choice: the ibus can deliver one
// transaction per L_i cycles while the ebus grants a cluster only one per
// N_cl * L_e cycles on average, so several requests of one cluster can be
// waiting.  With DEPTH equal to the number of cores and one outstanding miss
// per core it never fills.
//
// Interface: in_valid_i/in_i/in_ready_o from the ibus (in_ready_o is low when
// the FIFO could overflow); out_valid_o/out_o/out_ready_i to the ebus;
// level_o is the number of transactions waiting for the ebus.
// Timing: an accepted transaction is presented to the ebus S cycles later,
// at the earliest (S >= 1).
module bus_switch
  import pta_bus_pkg::*;
#(
  parameter int unsigned S     = 1,  // fixed crossing latency in cycles, >= 1
  parameter int unsigned DEPTH = 4   // waiting transactions
) (
  input  logic     clk_i,
  input  logic     rst_ni,
  input  logic     in_valid_i,
  input  bus_req_t in_i,
  output logic     in_ready_o,
  output logic     out_valid_o,
  output bus_req_t out_o,
  input  logic     out_ready_i,
  output logic [$clog2(DEPTH+1)-1:0] level_o   // transactions waiting for the ebus
);

  localparam int unsigned CNT_W = $clog2(DEPTH + 1);
  localparam int unsigned OCC_W = $clog2(DEPTH + S + 2);
  localparam int unsigned D     = S - 1;  // delay stages before the queue

  logic             push;
  bus_req_t         push_d;
  logic             empty, full;
  logic [CNT_W-1:0] count;
  logic [OCC_W-1:0] in_flight;

  // Fixed-latency delay line; writing the queue takes the last cycle.
  if (D == 0) begin : g_direct
    assign push      = in_valid_i && in_ready_o;
    assign push_d    = in_i;
    assign in_flight = OCC_W'(count);
  end else begin : g_delay
    logic     dl_v [D];
    bus_req_t dl_d [D];

    always_ff @(posedge clk_i or negedge rst_ni) begin
      if (!rst_ni) begin
        for (int i = 0; i < D; i++) dl_v[i] <= 1'b0;
      end else begin
        dl_v[0] <= in_valid_i && in_ready_o;
        for (int i = 1; i < D; i++) dl_v[i] <= dl_v[i-1];
      end
    end

    always_ff @(posedge clk_i) begin
      dl_d[0] <= in_i;
      for (int i = 1; i < D; i++) dl_d[i] <= dl_d[i-1];
    end

    // Room check counts what is still in the delay line.
    always_comb begin
      in_flight = OCC_W'(count);
      for (int i = 0; i < D; i++) in_flight = in_flight + OCC_W'(dl_v[i]);
    end

    assign push   = dl_v[D-1];
    assign push_d = dl_d[D-1];
  end

  assign in_ready_o = (in_flight < OCC_W'(DEPTH));

  sync_fifo #(.T(bus_req_t), .DEPTH(DEPTH)) u_q (
    .clk_i, .rst_ni,
    .push_i  (push),
    .data_i  (push_d),
    .pop_i   (out_valid_o && out_ready_i),
    .data_o  (out_o),
    .empty_o (empty),
    .full_o  (full),
    .count_o (count)
  );

  assign out_valid_o = !empty;
  assign level_o     = count;

  a_no_drop: assert property (@(posedge clk_i) disable iff (!rst_ni)
    push |-> !full || (out_valid_o && out_ready_i));

  initial assert (S >= 1) else $error("bus_switch: S must be at least 1");

endmodule
