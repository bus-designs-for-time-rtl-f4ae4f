// mem_ctrl -- fixed-latency memory controller behind the inter-cluster bus.
//
// Bridges the ebus and main memory.  Each accepted request is forwarded to
// memory in the same cycle and its response is handed back exactly LAT cycles
// after acceptance, however fast memory answered: a jittery resource made
// jitterless by always answering at its worst-case latency, so that its delay
// has a single value with probability 1.  Responses are broadcast with the id
// of the core that issued the request.
//
// Following the design: a fixed-latency controller between the buses and
// memory.  This design's choices: the value of LAT (the evaluation only says
// the controller bounds inter-task interference), the in-order memory
// interface, a response (acknowledge) also for writes, and up to DEPTH
// requests in flight.  Memory must answer every request, in order, within
// LAT-1 cycles; a later answer breaks the fixed latency, raises late_o and is
// flagged by an assertion, and the response then leaves as soon as it arrives.
//
// Interface: req_valid_i/req_i/req_ready_o from the ebus; mem_req_valid_o/
// mem_req_o to memory (no back-pressure); mem_rsp_valid_i/mem_rsp_rdata_i
// from memory; rsp_valid_o/rsp_o to the cores.  Timing: accepted in cycle t,
// rsp_valid_o in cycle t+LAT.
module mem_ctrl
  import pta_bus_pkg::*;
#(
  parameter int unsigned LAT   = 16,  // fixed response latency, >= 2
  parameter int unsigned DEPTH = 4    // requests in flight
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              req_valid_i,
  input  bus_req_t          req_i,
  output logic              req_ready_o,
  output logic              mem_req_valid_o,
  output mem_req_t          mem_req_o,
  input  logic              mem_rsp_valid_i,
  input  logic [LINE_W-1:0] mem_rsp_rdata_i,
  output logic              rsp_valid_o,
  output bus_rsp_t          rsp_o,
  output logic              late_o
);

  localparam int unsigned TW    = $clog2(LAT + 1) + 2;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  typedef struct packed {
    logic [ID_W-1:0] src;
    logic            we;
    logic [TW-1:0]   t_acc;   // cycle stamp at acceptance
  } tag_t;

  logic [TW-1:0]     now_q;
  tag_t              tag_in, tag_head;
  logic              tag_empty, tag_full, dat_empty, dat_full;
  logic [CNT_W-1:0]  tag_cnt, dat_cnt;
  logic [LINE_W-1:0] dat_head;
  logic              accept, due, release_rsp;
  logic [TW-1:0]     age;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) now_q <= '0;
    else         now_q <= now_q + TW'(1);
  end

  assign req_ready_o     = !tag_full;
  assign accept          = req_valid_i && req_ready_o;
  assign mem_req_valid_o = accept;
  assign mem_req_o       = '{we: req_i.we, addr: req_i.addr, wdata: req_i.wdata};

  assign tag_in = '{src: req_i.src, we: req_i.we, t_acc: now_q};

  sync_fifo #(.T(tag_t), .DEPTH(DEPTH)) u_tags (
    .clk_i, .rst_ni,
    .push_i (accept), .data_i (tag_in),
    .pop_i  (release_rsp), .data_o (tag_head),
    .empty_o (tag_empty), .full_o (tag_full), .count_o (tag_cnt)
  );

  // Read data from memory waits here until its response is due.
  sync_fifo #(.T(logic [LINE_W-1:0]), .DEPTH(DEPTH)) u_data (
    .clk_i, .rst_ni,
    .push_i (mem_rsp_valid_i), .data_i (mem_rsp_rdata_i),
    .pop_i  (release_rsp), .data_o (dat_head),
    .empty_o (dat_empty), .full_o (dat_full), .count_o (dat_cnt)
  );

  // Cycles since acceptance of the oldest request (the stamp is taken in the
  // accepting cycle, so age == LAT in cycle t+LAT).
  assign age         = now_q - tag_head.t_acc;
  assign due         = !tag_empty && (age >= TW'(LAT));
  assign release_rsp = due && !dat_empty;
  assign late_o      = due && dat_empty;

  assign rsp_valid_o = release_rsp;
  assign rsp_o       = '{src: tag_head.src, we: tag_head.we,
                         rdata: tag_head.we ? '0 : dat_head};

  a_mem_in_time: assert property (@(posedge clk_i) disable iff (!rst_ni) !late_o)
    else $error("mem_ctrl: memory answered later than LAT-1 cycles");
  a_no_extra_rsp: assert property (@(posedge clk_i) disable iff (!rst_ni)
    mem_rsp_valid_i |-> (dat_cnt < tag_cnt) || release_rsp);

  initial assert (LAT >= 2) else $error("mem_ctrl: LAT must be at least 2");

endmodule
