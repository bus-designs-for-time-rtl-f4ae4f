// tb_pta_multicore -- end-to-end test of pta_multicore at its default size
// (4 cores x 2 clusters, rounds of 8 cycles, random permutations).  Eight
// cores each run 300 line reads/writes through ibus, switch, ebus and memory
// controller; pta_system_checker checks data, ids and latency bounds.  This
// testbench also watches the status outputs, checks that every ibus and ebus
// window is a permutation of its contenders, and requires every mechanism
// of the design to occur: grants without wait, requests arriving mid-round
// and waiting for the round boundary, waits running into the next window,
// permutations regenerated at window boundaries, rounds left idle because
// their owner had no request while others waited, requests queueing in a
// switch, both clusters contending for the ebus, memory jitter hidden by the
// controller, and an arbiter reseed in the middle of the run.
module tb_pta_multicore;
  import pta_bus_pkg::*;
  localparam int N_CO = 4, N_CL = 2, NC = 8, NREQ = 300;

  logic clk = 0, rst_n = 0, seed_we = 0;
  logic [31:0] seed = 32'h0;
  always #5 clk = ~clk;

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

  pta_multicore u_dut (
    .clk_i(clk), .rst_ni(rst_n), .seed_we_i(seed_we), .seed_i(seed),
    .core_req_valid_i(rq_v), .core_req_i(rq), .core_req_ready_o(rq_r),
    .core_rsp_valid_o(rs_v), .core_rsp_o(rs),
    .mem_req_valid_o(m_v), .mem_req_o(m_q), .mem_rsp_valid_i(m_rv), .mem_rsp_rdata_i(m_rd),
    .mc_late_o(late),
    .ibus_round_start_o(i_rs), .ibus_window_start_o(i_ws), .ibus_owner_o(i_own),
    .ebus_round_start_o(e_rs), .ebus_window_start_o(e_ws), .ebus_owner_o(e_own),
    .switch_level_o(sw_lvl));

  logic done;
  int checks, failures, zero_waits, mid_round, next_window, mem_early, reads, writes, max_w, max_t;

  pta_system_checker #(.N_CO(N_CO), .N_CL(N_CL), .NREQ(NREQ)) u_chk (
    .clk_i(clk), .rst_ni(rst_n),
    .core_req_valid_o(rq_v), .core_req_o(rq), .core_req_ready_i(rq_r),
    .core_rsp_valid_i(rs_v), .core_rsp_i(rs),
    .mem_req_valid_i(m_v), .mem_req_i(m_q), .mem_rsp_valid_o(m_rv), .mem_rsp_rdata_o(m_rd),
    .mc_late_i(late), .done_o(done), .checks_o(checks), .failures_o(failures),
    .zero_waits_o(zero_waits), .mid_round_o(mid_round), .next_window_o(next_window),
    .mem_early_o(mem_early), .reads_o(reads), .writes_o(writes),
    .max_ibus_wait_o(max_w), .max_total_o(max_t));

  // Mechanisms seen on the status outputs.  The window order of cluster 0's
  // ibus is rebuilt from the owners at its round starts.
  int perm_changes = 0, ebus_perm_changes = 0, idle_owner = 0, switch_queued = 0;
  int ebus_contended = 0, reseeds = 0, windows = 0, bad_windows = 0;
  logic [1:0] win [N_CO];
  logic [1:0] prev_win [N_CO];
  logic [0:0] ewin [N_CL];
  logic [0:0] prev_ewin [N_CL];
  int r_i = -1, r_e = -1;

  always @(posedge clk) begin
    if (rst_n) begin
      if (i_rs[0]) begin
        if (i_ws[0]) begin
          if (r_i == N_CO - 1) begin
            bit [N_CO-1:0] seen = '0;
            for (int r = 0; r < N_CO; r++) seen[win[r]] = 1'b1;
            windows++;
            if (seen != '1) bad_windows++;
            if (windows > 1 && win != prev_win) perm_changes++;
            prev_win = win;
          end
          r_i = 0;
        end else if (r_i >= 0) r_i++;
        if (r_i >= 0) win[r_i] = i_own[0];
        if (!rq_v[i_own[0]] && (|rq_v[N_CO-1:0])) idle_owner++;
      end
      if (e_rs) begin
        if (e_ws) begin
          if (r_e == N_CL - 1) begin
            if (ewin[0] == ewin[1]) bad_windows++;
            if (ewin != prev_ewin) ebus_perm_changes++;
            prev_ewin = ewin;
          end
          r_e = 0;
        end else if (r_e >= 0) r_e++;
        if (r_e >= 0) ewin[r_e] = e_own;
      end
      if (sw_lvl[0] >= 2 || sw_lvl[1] >= 2) switch_queued++;
      if (sw_lvl[0] != 0 && sw_lvl[1] != 0) ebus_contended++;
    end
  end

  task automatic need(input int n, input string what);
    u_chk.checks_o++;
    $display("  %-44s %0d", what, n);
    if (n == 0) begin
      u_chk.failures_o++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // Reseed all arbiters once, mid-run.
    repeat (5000) @(posedge clk);
    #1 seed = 32'hC0FF_EE11; seed_we = 1;
    @(posedge clk);
    #1 seed_we = 0;
    reseeds++;
    wait (done);
    repeat (5) @(posedge clk);
    #1;
    $display("mechanisms:");
    need(zero_waits, "ibus grants with no wait");
    need(mid_round, "requests arriving mid-round");
    need(next_window, "waits running into the next window");
    need(perm_changes, "new permutations (cluster 0 ibus)");
    need(ebus_perm_changes, "new permutations (ebus)");
    need(windows, "ibus windows observed");
    u_chk.checks_o++;
    if (bad_windows != 0) begin
      u_chk.failures_o++;
      $display("FAIL %0d windows were not permutations", bad_windows);
    end
    need(idle_owner, "rounds idle while others wait");
    need(switch_queued, "cycles with >= 2 requests in a switch");
    need(ebus_contended, "cycles with both clusters on the ebus");
    need(mem_early, "memory answers hidden by fixed latency");
    need(reads, "line reads");
    need(writes, "line writes");
    need(reseeds, "arbiter reseeds");
    $display("max ibus wait %0d cycles (bound %0d), max request-to-response %0d cycles",
             max_w, 7 + 6 * 8, max_t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
