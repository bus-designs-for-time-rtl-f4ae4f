// tb_hbus_etp -- checks the end-to-end latency distribution of a cache miss
// through ibus, switch, ebus and memory controller against the composition of
// the per-resource distributions, on three 4x2 systems with L = 8:
//   A: random permutations (the defaults), only core 0 is active;
//   B: random permutations, core 0 measured while the four cores of cluster 1
//      keep the ebus busy;
//   C: lottery, only core 0 is active.
// Core 0 issues each request at a uniformly random cycle of a fresh ibus
// window.  From request to response the model is
//   T = a + k_i*L + L + k_e*L + (L-1) + MC_LAT
// with a uniform in 0..L-1 (alignment to the next round), k_i distributed as
// the policy's round wait for 4 contenders, k_e as that for 2 (for the
// lottery geometric, P(k) = (1-1/N)^k / N, cut at TMAX where both the
// measurement and the model put the remaining mass), and the
// ebus alignment zero because ibus and ebus rounds have the same length and
// start together (an ibus delivery in cycle L-1 plus the 1-cycle switch lands
// on an ebus round start).  Checks: every T lies in the model's support, the
// largest distance between measured and model distribution functions is
// below 0.02, and the means agree within 2 %.  B must match the same model
// as A: traffic of another cluster must not change core 0's delay.
module tb_hbus_etp;
  import pta_bus_pkg::*;
  localparam int L = 8, N_CO = 4, N_CL = 2, MC_LAT = 16, NC = 8, SAMPLES = 15000;
  localparam int TMAX = 160;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  localparam int NS = 3;
  localparam arb_policy_e POL [NS] = '{ARB_RANDPERM, ARB_RANDPERM, ARB_LOTTERY};

  // Model distributions of T: [0] random permutations, [1] lottery.
  real pmodel [2][TMAX+1];

  function automatic real p_perm(input int n, input int k);
    real p;
    if (k < 0 || k > 2 * n - 2) return 0.0;
    p = real'((n - k > 0) ? n - k : 0) / real'(n * n);
    for (int i = ((n - k > 1) ? n - k : 1); i <= ((n - 1 < 2 * n - k - 1) ? n - 1 : 2 * n - k - 1); i++)
      p += real'(i) / real'(n * n * n);
    return p;
  endfunction

  function automatic real p_lot(input int n, input int k);
    return ((1.0 - 1.0 / real'(n)) ** k) / real'(n);
  endfunction

  initial begin
    real rest;
    for (int m = 0; m < 2; m++)
      for (int t = 0; t <= TMAX; t++) pmodel[m][t] = 0.0;
    for (int a = 0; a < L; a++)
      for (int ki = 0; ki <= 2 * N_CO - 2; ki++)
        for (int ke = 0; ke <= 2 * N_CL - 2; ke++)
          pmodel[0][a + ki * L + L + ke * L + (L - 1) + MC_LAT] +=
            p_perm(N_CO, ki) * p_perm(N_CL, ke) / real'(L);
    rest = 1.0;
    for (int a = 0; a < L; a++)
      for (int ki = 0; ki <= TMAX / L; ki++)
        for (int ke = 0; ke <= TMAX / L; ke++) begin
          int t;
          t = a + ki * L + L + ke * L + (L - 1) + MC_LAT;
          if (t < TMAX) begin
            pmodel[1][t] += p_lot(N_CO, ki) * p_lot(N_CL, ke) / real'(L);
            rest -= p_lot(N_CO, ki) * p_lot(N_CL, ke) / real'(L);
          end
        end
    pmodel[1][TMAX] = rest;
  end

  int hist [NS][TMAX+1];
  int nsamp [NS];
  logic sys_done [NS];

  for (genvar s = 0; s < NS; s++) begin : g_sys
    logic [NC-1:0]     rq_v, rq_r, rs_v;
    bus_req_t          rq [NC];
    bus_rsp_t          rs;
    logic              m_v, m_rv, late;
    mem_req_t          m_q;
    logic [LINE_W-1:0] m_rd;
    logic [N_CL-1:0]   i_rs, i_ws;
    logic [N_CL-1:0][1:0] i_own;
    logic              e_rs, e_ws;
    logic [0:0]        e_own;
    logic [N_CL-1:0][2:0] sw_lvl;
    int                served, early;

    pta_multicore #(.POLICY(POL[s])) u_dut (
      .clk_i(clk), .rst_ni(rst_n), .seed_we_i(1'b0), .seed_i(32'h0),
      .core_req_valid_i(rq_v), .core_req_i(rq), .core_req_ready_o(rq_r),
      .core_rsp_valid_o(rs_v), .core_rsp_o(rs),
      .mem_req_valid_o(m_v), .mem_req_o(m_q), .mem_rsp_valid_i(m_rv), .mem_rsp_rdata_i(m_rd),
      .mc_late_o(late),
      .ibus_round_start_o(i_rs), .ibus_window_start_o(i_ws), .ibus_owner_o(i_own),
      .ebus_round_start_o(e_rs), .ebus_window_start_o(e_ws), .ebus_owner_o(e_own),
      .switch_level_o(sw_lvl));

    mem_model #(.MIN_LAT(1), .MAX_LAT(MC_LAT - 1)) u_mem (
      .clk_i(clk), .rst_ni(rst_n), .req_valid_i(m_v), .req_i(m_q),
      .rsp_valid_o(m_rv), .rsp_rdata_o(m_rd), .served_o(served), .early_o(early));

    // Core 0: 0 idle, waiting for a fresh window, 1 counting down, 2 requesting, 3 waiting.
    int st = 0, delay = 0, t_req = 0;
    bit busy1 [4];

    initial begin
      rq_v = '0;
      for (int c = 0; c < NC; c++) rq[c] = '0;
      for (int c = 0; c < 4; c++) busy1[c] = 0;
      nsamp[s] = 0;
      sys_done[s] = 0;
      for (int t = 0; t <= TMAX; t++) hist[s][t] = 0;
    end

    always @(posedge clk) begin
      if (rst_n) begin
        // Measured core.
        case (st)
          0: if (i_ws[0] && nsamp[s] < SAMPLES) begin
               delay = $urandom_range(0, N_CO * L - 1);
               st = 1;
             end
          1: ;
          default: ;
        endcase
        if (st == 1) begin
          if (delay == 0) begin
            rq_v[0] <= 1'b1;
            rq[0] <= '{src: '0, we: 1'b0, addr: 32'h40 * 32'(nsamp[s] % 16), wdata: '0};
            t_req = cyc + 1;
            st = 2;
          end else delay--;
        end
        if (st == 2 && rq_r[0]) begin
          rq_v[0] <= 1'b0;
          st = 3;
        end
        if (st == 3 && rs_v[0]) begin
          int t;
          t = cyc - t_req;
          hist[s][(t > TMAX) ? TMAX : t]++;
          nsamp[s]++;
          st = 0;
          if (nsamp[s] == SAMPLES) sys_done[s] <= 1'b1;
        end
        // System B: cluster 1 keeps requesting, one outstanding miss per core.
        if (s == 1) begin
          for (int c = 0; c < 4; c++) begin
            if (rq_r[4 + c]) begin
              rq_v[4 + c] <= 1'b0;
              busy1[c] = 1;
            end else if (!rq_v[4 + c] && !busy1[c]) begin
              rq_v[4 + c] <= 1'b1;
              rq[4 + c] <= '{src: '0, we: 1'($urandom), addr: {8'(4 + c), 18'($urandom_range(0, 15)), 6'd0},
                             wdata: {16{$urandom}}};
            end
            if (rs_v[4 + c]) busy1[c] = 0;
          end
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (!(sys_done[0] && sys_done[1] && sys_done[2])) @(posedge clk);
    #1;
    for (int s = 0; s < NS; s++) begin
      real fe, fm, dmax, me, mm;
      int outside;
      fe = 0.0; fm = 0.0; dmax = 0.0; me = 0.0; mm = 0.0;
      outside = 0;
      for (int t = 0; t <= TMAX; t++) begin
        real pe;
        real pm;
        pe = real'(hist[s][t]) / real'(SAMPLES);
        pm = pmodel[(POL[s] == ARB_LOTTERY) ? 1 : 0][t];
        if (hist[s][t] > 0 && pm == 0.0) outside += hist[s][t];
        fe += pe;
        fm += pm;
        me += real'(t) * pe;
        mm += real'(t) * pm;
        if (fe - fm > dmax) dmax = fe - fm;
        if (fm - fe > dmax) dmax = fm - fe;
      end
      chk(outside == 0, $sformatf("system %0d: %0d latencies outside the model's support", s, outside));
      chk(dmax < 0.02, $sformatf("system %0d: distribution distance %f", s, dmax));
      chk(me < mm * 1.02 && me > mm * 0.98, $sformatf("system %0d: mean %f vs model %f", s, me, mm));
      $display("system %s: mean miss latency %6.2f cycles (model %6.2f), max distribution distance %5.3f",
               (s == 0) ? "A (alone)       " : (s == 1) ? "B (ebus loaded) " : "C (lottery)     ", me, mm, dmax);
    end
    chk(g_sys[1].served > 2 * SAMPLES, "cluster 1 kept the ebus busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
