// tb_pta_configs -- runs pta_multicore in every evaluated cluster setup side
// by side: 4x1, 4x4, 8x1 and 8x2 (cores per cluster x clusters) with random
// permutations, and the default 4x2 with the lottery policy and with the
// deterministic round robin.  Each system has its own pta_system_checker
// (data, ids, latency bounds; no wait bound for the lottery).  Also required:
// under the random policies some request waited longer than N-1 rounds plus
// the alignment (into the next window), under the lottery
// some ibus wait exceeded the 2N-2 round bound that random permutations
// guarantee, and under round robin no ibus wait exceeded N-1 rounds plus the
// alignment to the next round.  A last 4x2 system has an ebus twice as slow
// as the ibus (L_E = 16, the usual case of a longer inter-cluster bus) and a
// 2-cycle switch, so ibus and ebus rounds are no longer in step.
module tb_pta_configs;
  import pta_bus_pkg::*;
  localparam int NREQ = 150;
  localparam int NSYS = 7;
  localparam int CO [NSYS] = '{4, 4, 8, 8, 4, 4, 4};
  localparam int CL [NSYS] = '{1, 4, 1, 2, 2, 2, 2};
  localparam int LE [NSYS] = '{8, 8, 8, 8, 8, 8, 16};
  localparam int SL [NSYS] = '{1, 1, 1, 1, 1, 1, 2};
  localparam arb_policy_e PO [NSYS] = '{ARB_RANDPERM, ARB_RANDPERM, ARB_RANDPERM, ARB_RANDPERM,
                                        ARB_LOTTERY, ARB_RR, ARB_RANDPERM};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic done [NSYS];
  int   checks [NSYS], failures [NSYS], nextw [NSYS], maxw [NSYS];

  for (genvar k = 0; k < NSYS; k++) begin : g_sys
    localparam int NC = CO[k] * CL[k];
    localparam arb_policy_e POL = PO[k];
    logic [NC-1:0]     rq_v, rq_r, rs_v;
    bus_req_t          rq [NC];
    bus_rsp_t          rs;
    logic              m_v, m_rv, late;
    mem_req_t          m_q;
    logic [LINE_W-1:0] m_rd;
    int                zw, mr, me, rd, wr, mt;

    pta_multicore #(.N_CO(CO[k]), .N_CL(CL[k]), .L_E(LE[k]), .S_LAT(SL[k]), .POLICY(POL)) u_dut (
      .clk_i(clk), .rst_ni(rst_n), .seed_we_i(1'b0), .seed_i(32'h0),
      .core_req_valid_i(rq_v), .core_req_i(rq), .core_req_ready_o(rq_r),
      .core_rsp_valid_o(rs_v), .core_rsp_o(rs),
      .mem_req_valid_o(m_v), .mem_req_o(m_q), .mem_rsp_valid_i(m_rv), .mem_rsp_rdata_i(m_rd),
      .mc_late_o(late));

    pta_system_checker #(.N_CO(CO[k]), .N_CL(CL[k]), .L_E(LE[k]), .S_LAT(SL[k]), .NREQ(NREQ),
                         .BOUNDED(POL != ARB_LOTTERY)) u_chk (
      .clk_i(clk), .rst_ni(rst_n),
      .core_req_valid_o(rq_v), .core_req_o(rq), .core_req_ready_i(rq_r),
      .core_rsp_valid_i(rs_v), .core_rsp_i(rs),
      .mem_req_valid_i(m_v), .mem_req_i(m_q), .mem_rsp_valid_o(m_rv), .mem_rsp_rdata_o(m_rd),
      .mc_late_i(late), .done_o(done[k]), .checks_o(checks[k]), .failures_o(failures[k]),
      .zero_waits_o(zw), .mid_round_o(mr), .next_window_o(nextw[k]),
      .mem_early_o(me), .reads_o(rd), .writes_o(wr),
      .max_ibus_wait_o(maxw[k]), .max_total_o(mt));
  end

  function automatic bit all_done();
    for (int k = 0; k < NSYS; k++) if (!done[k]) return 0;
    return 1;
  endfunction

  initial begin
    int tc, tf;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (!all_done()) @(posedge clk);
    repeat (5) @(posedge clk);
    #1;
    tc = 0; tf = 0;
    for (int k = 0; k < NSYS; k++) begin
      tc += checks[k] + 1;
      tf += failures[k];
      // A wait longer than N-1 rounds plus alignment: needed under the random
      // policies, impossible under round robin.
      if ((nextw[k] == 0) != (PO[k] == ARB_RR)) begin
        tf++;
        $display("FAIL %0dx%0d %s: %0d waits beyond N-1 rounds", CO[k], CL[k], PO[k].name(), nextw[k]);
      end
      $display("%0dx%0d %s L_E=%0d S=%0d: %0d checks, %0d failures, max ibus wait %0d cycles",
               CO[k], CL[k], PO[k].name(), LE[k], SL[k], checks[k], failures[k], maxw[k]);
    end
    tc += 2;
    if (maxw[4] <= 7 + 6 * 8) begin tf++; $display("FAIL lottery never exceeded the permutation bound"); end
    if (maxw[5] > 7 + 3 * 8) begin tf++; $display("FAIL round-robin wait %0d above N-1 rounds", maxw[5]); end
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    $display("watchdog expired");
    for (int k = 0; k < NSYS; k++)
      $display("%0dx%0d done=%0d checks=%0d failures=%0d", CO[k], CL[k], done[k], checks[k], failures[k]);
    $display("TB_RESULT checks=1 failures=1");
    $finish;
  end
endmodule
