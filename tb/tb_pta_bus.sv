// tb_pta_bus -- drives two buses with randomly arriving requests and checks
// every transfer against a scoreboard kept by the testbench.
//   u_perm: N = 4, L = 8, random permutations.  Grants only in the first cycle
//           of a round and only to its owner; a waiting owner is always granted
//           while the bus is free; the wait from request to grant is at most
//           (L-1) + (2N-2)*L cycles; delivery comes L-1 cycles after the grant
//           with the granted payload (the wait bound is checked while the
//           downstream side always accepts); rounds owned by idle contenders stay idle.
//           In the second half the downstream side refuses deliveries at
//           random: nothing may be lost, duplicated or reordered.
//   u_lot:  N = 2, L = 1, lottery: payload and order checks only (the lottery
//           wait has no bound).
module tb_pta_bus;
  import pta_bus_pkg::*;
  localparam int CYCLES = 40000;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // ---------------- random permutation bus, N = 4, L = 8 ----------------
  localparam int N = 4, L = 8;
  logic [N-1:0] pv, pr;
  bus_req_t     preq [N];
  logic         po_v, po_r, p_rs, p_ws, p_busy;
  bus_req_t     po;
  logic [1:0]   p_own;

  pta_bus #(.N(N), .L(L), .POLICY(ARB_RANDPERM), .SEED(32'h5EED_0001)) u_perm (
    .clk_i(clk), .rst_ni(rst_n), .seed_we_i(1'b0), .seed_i(32'd0),
    .req_valid_i(pv), .req_i(preq), .req_ready_o(pr),
    .out_valid_o(po_v), .out_o(po), .out_ready_i(po_r),
    .round_start_o(p_rs), .window_start_o(p_ws), .owner_o(p_own), .busy_o(p_busy));

  int       arrive [N];
  bus_req_t exp_q [$];
  int       exp_t [$];
  int       max_wait = 0, idle_rounds_with_waiters = 0, mid_round_arrivals = 0;
  int       zero_waits = 0, refused = 0, delivered_p = 0;
  int       round_phase = -1;

  function automatic bus_req_t rand_req(input int src);
    bus_req_t r;
    r.src = ID_W'(src);
    r.we = 1'($urandom_range(0, 1));
    r.addr = $urandom;
    r.wdata = {16{$urandom}};
    return r;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      // Delivery check.
      if (po_v && po_r) begin
        chk(exp_q.size() > 0, "delivery without grant");
        if (exp_q.size() > 0) begin
          bus_req_t e;
          int t;
          e = exp_q.pop_front();
          t = exp_t.pop_front();
          chk(po == e, "delivered payload");
          if (cyc < CYCLES / 2) chk(cyc == t + L - 1, "delivery L-1 cycles after grant");
          else                  chk(cyc >= t + L - 1, "delivery not early");
          delivered_p++;
        end
      end
      if (po_v && !po_r) refused++;
      // Grant checks.
      for (int i = 0; i < N; i++) begin
        if (pr[i]) begin
          chk(pv[i], "grant without request");
          chk(p_rs && p_own == 2'(i), "grant only at owner's round start");
          if (cyc < CYCLES / 2) begin
            chk(cyc - arrive[i] <= (L - 1) + (2 * N - 2) * L, "wait bound 2N-2 rounds");
            if (cyc - arrive[i] > max_wait) max_wait = cyc - arrive[i];
          end
          if (cyc == arrive[i]) zero_waits++;
          exp_q.push_back(preq[i]);
          exp_t.push_back(cyc);
        end
      end
      if (p_rs) begin
        round_phase = 0;
        if (pv[p_own] && !(p_busy && !(po_v && po_r))) chk(pr[p_own], "waiting owner granted");
        if (!pv[p_own] && (|pv)) idle_rounds_with_waiters++;
      end else if (round_phase >= 0) round_phase++;
      // Drive contenders: new requests arrive at random cycles.
      for (int i = 0; i < N; i++) begin
        if (!pv[i] || pr[i]) begin
          if ($urandom_range(0, 19) == 0) begin
            pv[i] <= 1'b1;
            preq[i] <= rand_req(i);
            arrive[i] = cyc + 1;
            if (round_phase >= 0 && round_phase != L - 1) mid_round_arrivals++;
          end else pv[i] <= 1'b0;
        end
      end
      po_r <= (cyc < CYCLES / 2) ? 1'b1 : ($urandom_range(0, 2) == 0);
    end
  end

  // ---------------- lottery bus, N = 2, L = 1 ----------------
  logic [1:0] lv, lr;
  bus_req_t   lreq [2];
  logic       lo_v, l_rs, l_ws, l_busy;
  bus_req_t   lo;
  logic [0:0] l_own;
  bus_req_t   lexp_q [$];
  int         delivered_l = 0;
  int         lot_grants [2];

  pta_bus #(.N(2), .L(1), .POLICY(ARB_LOTTERY), .SEED(32'h5EED_0002)) u_lot (
    .clk_i(clk), .rst_ni(rst_n), .seed_we_i(1'b0), .seed_i(32'd0),
    .req_valid_i(lv), .req_i(lreq), .req_ready_o(lr),
    .out_valid_o(lo_v), .out_o(lo), .out_ready_i(1'b1),
    .round_start_o(l_rs), .window_start_o(l_ws), .owner_o(l_own), .busy_o(l_busy));

  always @(posedge clk) begin
    if (rst_n) begin
      if (lo_v) begin
        chk(lexp_q.size() > 0, "lottery delivery without grant");
        if (lexp_q.size() > 0) chk(lo == lexp_q.pop_front(), "lottery payload");
        delivered_l++;
      end
      for (int i = 0; i < 2; i++) begin
        if (lr[i]) begin
          chk(l_own == 1'(i) && lv[i], "lottery grant to owner");
          lexp_q.push_back(lreq[i]);
          lot_grants[i]++;
        end
        if (!lv[i] || lr[i]) begin
          lv[i] <= 1'b1;   // saturated contenders
          lreq[i] <= rand_req(i);
        end
      end
    end
  end

  initial begin
    pv = '0; lv = '0; po_r = 1'b1;
    lot_grants[0] = 0; lot_grants[1] = 0;
    for (int i = 0; i < N; i++) begin arrive[i] = 0; preq[i] = '0; end
    lreq[0] = '0; lreq[1] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (cyc >= CYCLES);
    @(posedge clk); #1;
    chk(delivered_p > 1000, $sformatf("permutation bus deliveries (%0d)", delivered_p));
    chk(delivered_l > 1000, $sformatf("lottery bus deliveries (%0d)", delivered_l));
    chk(lot_grants[0] > delivered_l / 3 && lot_grants[1] > delivered_l / 3, "lottery shares rounds");
    chk(idle_rounds_with_waiters > 0, "idle owner rounds while others wait");
    chk(mid_round_arrivals > 0, "requests arriving mid-round");
    chk(zero_waits > 0, "requests granted with no wait");
    chk(refused > 0, "deliveries refused downstream");
    chk(max_wait > (N - 1) * L, "waits spanning into the next window");
    $display("perm bus: %0d deliveries, max wait %0d cycles, %0d idle owner rounds, %0d zero waits, %0d refusals",
             delivered_p, max_wait, idle_rounds_with_waiters, zero_waits, refused);
    $display("lottery bus: %0d deliveries, grants %0d/%0d", delivered_l, lot_grants[0], lot_grants[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
