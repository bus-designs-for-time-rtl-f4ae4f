// pta_bus_pkg -- types and defaults shared by the time-randomised bus hierarchy.
//
// A bus transaction is one cache-line miss (read fill) or line write issued by
// a core.  Line size (64 bytes) and the bus round length (L = 8 cycles) follow
// the evaluated configuration; a 64-byte line moved in 8 cycles implies an
// 8-byte wide bus, but the RTL carries the whole transaction as one struct for
// the L cycles of a round instead of modelling individual beats.  Address width,
// source-id width and the arbitration-policy encoding are this design's choices.
package pta_bus_pkg;

  // Geometry of the evaluated setup.
  localparam int unsigned LINE_BYTES = 64;             // cache line size
  localparam int unsigned LINE_W     = LINE_BYTES * 8; // bits per line
  localparam int unsigned ADDR_W     = 32;             // byte address width
  localparam int unsigned ID_W       = 8;              // global core id (up to 256 cores)

  // Bus round length used for every bus in the evaluation.
  localparam int unsigned BUS_L_DEFAULT = 8;

  // Arbitration policies: the two time-randomised ones proposed for
  // PTA-compliant buses, and the deterministic round-robin bus they are
  // compared against.
  typedef enum logic [1:0] {
    ARB_RANDPERM = 2'd0,  // random permutation per window of N rounds
    ARB_LOTTERY  = 2'd1,  // random contender drawn every round
    ARB_RR       = 2'd2   // fixed order: contender r owns round r of every window
  } arb_policy_e;

  // Request carried over ibus, switch and ebus to the memory controller.
  typedef struct packed {
    logic [ID_W-1:0]   src;    // global id of the issuing core
    logic              we;     // 1: line write, 0: line read
    logic [ADDR_W-1:0] addr;   // line-aligned byte address
    logic [LINE_W-1:0] wdata;  // write data (ignored for reads)
  } bus_req_t;

  // Response returned by the memory controller to the issuing core.
  typedef struct packed {
    logic [ID_W-1:0]   src;    // core the response belongs to
    logic              we;     // echo of the request type
    logic [LINE_W-1:0] rdata;  // read data (zero for writes)
  } bus_rsp_t;

  // Memory-side request (to the off-chip memory / its controller PHY).
  typedef struct packed {
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [LINE_W-1:0] wdata;
  } mem_req_t;

endpackage
