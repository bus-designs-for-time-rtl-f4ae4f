// tb_mem_ctrl -- checks the fixed-latency memory controller (LAT = 16) with a
// memory that answers after a random 1..15 cycles.  Requests with random ids,
// types and addresses arrive at random cycles (at most one per cycle).
// Checks: every response comes exactly LAT cycles after its request was
// accepted, in order, with the right id, type and data (reads return the last
// line written to that address, writes return zero), the late flag never
// rises, and memory jitter actually occurred.  A second phase floods the
// controller so that it fills up and drops req_ready_o.
module tb_mem_ctrl;
  import pta_bus_pkg::*;
  localparam int LAT = 16, CYCLES = 20000;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  logic              rv, rr, mv, mrv, sv, late;
  bus_req_t          rq;
  mem_req_t          mq;
  logic [LINE_W-1:0] mrd;
  bus_rsp_t          rsp;
  int                served, early;

  mem_ctrl #(.LAT(LAT), .DEPTH(4)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .req_valid_i(rv), .req_i(rq), .req_ready_o(rr),
    .mem_req_valid_o(mv), .mem_req_o(mq),
    .mem_rsp_valid_i(mrv), .mem_rsp_rdata_i(mrd),
    .rsp_valid_o(sv), .rsp_o(rsp), .late_o(late));

  mem_model #(.MIN_LAT(1), .MAX_LAT(LAT - 1)) u_mem (
    .clk_i(clk), .rst_ni(rst_n), .req_valid_i(mv), .req_i(mq),
    .rsp_valid_o(mrv), .rsp_rdata_o(mrd), .served_o(served), .early_o(early));

  // Reference memory contents, kept independently of the model.
  logic [LINE_W-1:0] ref_mem [logic [ADDR_W-1:0]];
  bus_rsp_t exp_r [$];
  int       exp_t [$];
  bit       stop = 0;
  int       full_cycles = 0, responses = 0, reads = 0, writes = 0;

  function automatic logic [LINE_W-1:0] init_line(input logic [ADDR_W-1:0] a);
    logic [LINE_W-1:0] v;
    for (int i = 0; i < LINE_W / 32; i++) v[i*32 +: 32] = a ^ (32'h9E37_79B9 * (i + 1));
    return v;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      chk(!late, "late flag");
      if (sv) begin
        chk(exp_r.size() > 0, "response without request");
        if (exp_r.size() > 0) begin
          bus_rsp_t e;
          int t;
          e = exp_r.pop_front();
          t = exp_t.pop_front();
          chk(rsp == e, "response id, type and data");
          chk(cyc == t + LAT, $sformatf("fixed latency (got %0d)", cyc - t));
          responses++;
        end
      end
      if (rv && rr) begin
        bus_rsp_t e;
        chk(mv && mq.addr == rq.addr && mq.we == rq.we, "forwarded to memory in the same cycle");
        e.src = rq.src;
        e.we = rq.we;
        if (rq.we) begin
          ref_mem[rq.addr] = rq.wdata;
          e.rdata = '0;
          writes++;
        end else begin
          e.rdata = ref_mem.exists(rq.addr) ? ref_mem[rq.addr] : init_line(rq.addr);
          reads++;
        end
        exp_r.push_back(e);
        exp_t.push_back(cyc);
      end
      if (rv && !rr) full_cycles++;
      if (!rv || rr) begin
        rv <= stop ? 1'b0 : (cyc < CYCLES / 2) ? ($urandom_range(0, 5) == 0) : 1'b1;
        rq <= '{src: ID_W'($urandom), we: 1'($urandom), addr: {26'($urandom_range(0, 15)), 6'd0},
                wdata: {16{$urandom}}};
      end
    end
  end

  initial begin
    rv = 0; rq = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (cyc >= CYCLES);
    stop = 1;
    repeat (LAT + 5) @(posedge clk);
    #1;
    chk(exp_r.size() == 0, "all requests answered");
    chk(responses > 1000 && reads > 100 && writes > 100, "traffic");
    chk(early > 100, "memory answered before the fixed latency");
    chk(full_cycles > 0, "controller filled up");
    $display("%0d responses (%0d reads, %0d writes), %0d early memory answers, %0d full cycles",
             responses, reads, writes, early, full_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
