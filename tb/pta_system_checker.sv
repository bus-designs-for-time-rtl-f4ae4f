// pta_system_checker -- traffic generator, memory and scoreboard for a whole
// pta_multicore (not synthesizable).  Each of the N_CO*N_CL cores issues
// NREQ line reads and writes, one outstanding at a time, after random think
// times (sometimes none), to addresses of its own region so that a
// per-core reference memory predicts every read.  A mem_model with random
// latency 1..MC_LAT-1 sits on the memory port.
// Checks per request: the response comes to the right core with the right
// type and data; the ibus grant comes at most (L_I-1)+(2*N_CO-2)*L_I cycles
// after the request; from grant to response it takes at least the sum of the
// fixed parts, (L_I-1)+S+(L_E-1)+MC_LAT, and at most that plus the ebus waits
// of the requests queued in the switch.
// Counts, for the testbench to judge: grants with no wait, requests that
// arrived mid-round, waits that run into the next window, early memory answers.
module pta_system_checker
  import pta_bus_pkg::*;
#(
  parameter int N_CO   = 4,
  parameter int N_CL   = 2,
  parameter int L_I    = 8,
  parameter int L_E    = 8,
  parameter int S_LAT  = 1,
  parameter int MC_LAT = 16,
  parameter int NREQ   = 200,
  parameter bit BOUNDED = 1,   // 0 for the lottery: waits have no bound
  parameter int NC     = N_CO * N_CL
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  output logic [NC-1:0]     core_req_valid_o,
  output bus_req_t          core_req_o [NC],
  input  logic [NC-1:0]     core_req_ready_i,
  input  logic [NC-1:0]     core_rsp_valid_i,
  input  bus_rsp_t          core_rsp_i,
  input  logic              mem_req_valid_i,
  input  mem_req_t          mem_req_i,
  output logic              mem_rsp_valid_o,
  output logic [LINE_W-1:0] mem_rsp_rdata_o,
  input  logic              mc_late_i,
  output logic              done_o,
  output int                checks_o,
  output int                failures_o,
  output int                zero_waits_o,
  output int                mid_round_o,
  output int                next_window_o,
  output int                mem_early_o,
  output int                reads_o,
  output int                writes_o,
  output int                max_ibus_wait_o,
  output int                max_total_o
);

  localparam int IBUS_BOUND = (L_I - 1) + (2 * N_CO - 2) * L_I;
  localparam int MIN_REST   = (L_I - 1) + S_LAT + (L_E - 1) + MC_LAT;
  localparam int EBUS_ONE   = (L_E - 1) + (2 * N_CL - 2) * L_E + L_E;
  localparam int MAX_REST   = (L_I - 1) + S_LAT + N_CO * EBUS_ONE + MC_LAT;

  typedef enum logic [1:0] {IDLE, REQ, RSP} cstate_e;

  int cyc = 0;
  always @(posedge clk_i) cyc <= cyc + 1;

  int served;
  mem_model #(.MIN_LAT(1), .MAX_LAT(MC_LAT - 1)) u_mem (
    .clk_i, .rst_ni, .req_valid_i(mem_req_valid_i), .req_i(mem_req_i),
    .rsp_valid_o(mem_rsp_valid_o), .rsp_rdata_o(mem_rsp_rdata_o),
    .served_o(served), .early_o(mem_early_o));

  cstate_e           st [NC];
  int                think [NC], t_req [NC], t_grant [NC], done_cnt [NC];
  bus_rsp_t          expect_rsp [NC];
  logic [LINE_W-1:0] ref_mem [NC][16];
  logic [15:0]       written [NC];

  function automatic logic [LINE_W-1:0] init_line(input logic [ADDR_W-1:0] a);
    logic [LINE_W-1:0] v;
    for (int i = 0; i < LINE_W / 32; i++) v[i*32 +: 32] = a ^ (32'h9E37_79B9 * (i + 1));
    return v;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks_o++;
    if (!ok) begin
      failures_o++;
      if (failures_o < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  initial begin
    checks_o = 0; failures_o = 0; zero_waits_o = 0; mid_round_o = 0; next_window_o = 0;
    reads_o = 0; writes_o = 0; max_ibus_wait_o = 0; max_total_o = 0; done_o = 0;
    core_req_valid_o = '0;
    for (int c = 0; c < NC; c++) begin
      st[c] = IDLE; think[c] = $urandom_range(0, 20); done_cnt[c] = 0; written[c] = '0;
      core_req_o[c] = '0;
    end
  end

  always @(posedge clk_i) begin
    if (rst_ni) begin
      chk(!mc_late_i, "memory controller late");
      for (int c = 0; c < NC; c++) begin
        // Response side.
        if (core_rsp_valid_i[c] && st[c] != RSP) begin
          chk(1'b0, $sformatf("response to core %0d, which waits for none", c));
        end else if (core_rsp_valid_i[c]) begin
          chk(core_rsp_i == expect_rsp[c], $sformatf("core %0d response", c));
          chk(cyc - t_grant[c] >= MIN_REST, $sformatf("core %0d latency below fixed parts (%0d)", c, cyc - t_grant[c]));
          if (BOUNDED)
            chk(cyc - t_grant[c] <= MAX_REST, $sformatf("core %0d latency above bound (%0d)", c, cyc - t_grant[c]));
          if (cyc - t_req[c] > max_total_o) max_total_o = cyc - t_req[c];
          st[c] = IDLE;
          think[c] = ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(1, 40);
          done_cnt[c]++;
        end
        // Grant side.
        if (core_req_ready_i[c]) begin
          int w;
          chk(st[c] == REQ && core_req_valid_o[c], "grant without request");
          w = cyc - t_req[c];
          if (BOUNDED) chk(w <= IBUS_BOUND, $sformatf("ibus wait %0d above bound", w));
          if (w > max_ibus_wait_o) max_ibus_wait_o = w;
          if (w == 0) zero_waits_o++;
          if (w % L_I != 0) mid_round_o++;
          if (w > (N_CO - 1) * L_I + (L_I - 1)) next_window_o++;
          t_grant[c] = cyc;
          st[c] = RSP;
          core_req_valid_o[c] <= 1'b0;
        end else if (st[c] == IDLE && done_cnt[c] < NREQ) begin
          // Request side: issue after the think time.
          if (think[c] == 0) begin
            bus_req_t r;
            int line;
            line = $urandom_range(0, 15);
            r.src = ID_W'($urandom);   // the top overwrites it
            r.we = 1'($urandom_range(0, 2) == 0);
            r.addr = {8'(c), 18'(line), 6'd0};
            r.wdata = {16{$urandom}};
            expect_rsp[c].src = ID_W'(c);
            expect_rsp[c].we = r.we;
            if (r.we) begin
              ref_mem[c][line] = r.wdata;
              written[c][line] = 1'b1;
              expect_rsp[c].rdata = '0;
              writes_o++;
            end else begin
              expect_rsp[c].rdata = written[c][line] ? ref_mem[c][line] : init_line(r.addr);
              reads_o++;
            end
            core_req_o[c] <= r;
            core_req_valid_o[c] <= 1'b1;
            t_req[c] = cyc + 1;
            st[c] = REQ;
          end else think[c]--;
        end
      end
      done_o <= 1'b1;
      for (int c = 0; c < NC; c++) if (done_cnt[c] < NREQ) done_o <= 1'b0;
    end
  end

endmodule
