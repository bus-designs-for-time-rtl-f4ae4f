// tb_round_arbiter -- checks round and window timing and owner selection of
// three arbiters, N = 4 contenders, L = 8 cycles per round: one with random
// permutations, one with the lottery, one with the deterministic round robin.  Checks, against cycle counts kept by
// the testbench: round starts every L cycles, windows every N*L cycles, the
// owner is stable within a round; for random permutations every window gives
// each contender exactly one round and the order changes between windows, and
// each contender owns each slot about 1/N of the time; for the lottery each
// contender owns about 1/N of the rounds and windows with a repeated owner
// occur; for round robin contender r owns round r of every window.
module tb_round_arbiter;
  import pta_bus_pkg::*;
  localparam int N = 4, L = 8, WINDOWS = 4000;

  logic clk = 0, rst_n = 0;
  logic rs_p, rl_p, ws_p, rs_l, rl_l, ws_l;
  logic [1:0] own_p, own_l, idx_p, idx_l;
  logic [7:0] perm_p, perm_l;
  logic rs_r, rl_r, ws_r;
  logic [1:0] own_r, idx_r;
  logic [7:0] perm_r;
  int checks = 0, failures = 0;

  round_arbiter #(.N(N), .L(L), .POLICY(ARB_RANDPERM), .SEED(32'hACE1_2345)) dut_p (
    .clk_i(clk), .rst_ni(rst_n), .seed_we_i(1'b0), .seed_i(32'd0),
    .round_start_o(rs_p), .round_last_o(rl_p), .window_start_o(ws_p),
    .owner_o(own_p), .round_idx_o(idx_p), .perm_o(perm_p));
  round_arbiter #(.N(N), .L(L), .POLICY(ARB_LOTTERY), .SEED(32'h0BAD_F00D)) dut_l (
    .clk_i(clk), .rst_ni(rst_n), .seed_we_i(1'b0), .seed_i(32'd0),
    .round_start_o(rs_l), .round_last_o(rl_l), .window_start_o(ws_l),
    .owner_o(own_l), .round_idx_o(idx_l), .perm_o(perm_l));
  round_arbiter #(.N(N), .L(L), .POLICY(ARB_RR), .SEED(32'h0000_0001)) dut_r (
    .clk_i(clk), .rst_ni(rst_n), .seed_we_i(1'b0), .seed_i(32'd0),
    .round_start_o(rs_r), .round_last_o(rl_r), .window_start_o(ws_r),
    .owner_o(own_r), .round_idx_o(idx_r), .perm_o(perm_r));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int slot_hits [N][N];
  int lot_hits [N];
  int changed_windows, repeat_windows;

  initial begin
    logic [1:0] cur_p [N];
    logic [1:0] prev_p [N];
    logic [1:0] cur_l [N];
    bit [N-1:0] seen;
    int c, first_start;
    for (int i = 0; i < N; i++) begin
      lot_hits[i] = 0;
      for (int j = 0; j < N; j++) slot_hits[i][j] = 0;
    end
    changed_windows = 0; repeat_windows = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // One set-up cycle, then the first window starts.
    c = 0;
    while (!ws_p) begin @(posedge clk); #1; c++; end
    chk(c == 1, "first window one cycle after reset");
    for (int w = 0; w < WINDOWS; w++) begin
      for (int r = 0; r < N; r++) begin
        logic [1:0] o_p, o_l;
        chk(rs_p && rs_l && rs_r, "round start");
        chk((r == 0) == ws_p && ws_p == ws_l && ws_p == ws_r, "window start");
        chk(own_r == 2'(r) && idx_r == 2'(r), "round-robin owner");
        chk(idx_p == 2'(r), "round index");
        o_p = own_p; o_l = own_l;
        for (int k = 0; k < L; k++) begin
          chk(own_p == o_p && own_l == o_l && own_r == 2'(r), "owner stable within round");
          chk((k == 0) == rs_p && (k == L - 1) == rl_p, "cycle position");
          @(posedge clk); #1;
        end
        cur_p[r] = o_p;
        cur_l[r] = o_l;
      end
      seen = '0;
      for (int r = 0; r < N; r++) begin
        seen[cur_p[r]] = 1'b1;
        slot_hits[cur_p[r]][r]++;
        lot_hits[cur_l[r]]++;
      end
      chk(seen == '1, "window is a permutation");
      if (w > 0 && cur_p != prev_p) changed_windows++;
      seen = '0;
      for (int r = 0; r < N; r++) seen[cur_l[r]] = 1'b1;
      if (seen != '1) repeat_windows++;
      prev_p = cur_p;
    end
    // Statistics: expected WINDOWS/N per (id, slot); allow +-15 %.
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++)
        chk(slot_hits[i][j] > WINDOWS / N * 85 / 100 && slot_hits[i][j] < WINDOWS / N * 115 / 100,
            $sformatf("slot uniformity id %0d slot %0d = %0d", i, j, slot_hits[i][j]));
      chk(lot_hits[i] > WINDOWS * 85 / 100 && lot_hits[i] < WINDOWS * 115 / 100,
          $sformatf("lottery uniformity id %0d = %0d", i, lot_hits[i]));
    end
    // P(same order twice) is small; P(lottery window is a permutation) = 4!/4^4.
    chk(changed_windows > WINDOWS * 3 / 4, $sformatf("permutation changes (%0d)", changed_windows));
    chk(repeat_windows > WINDOWS / 2, $sformatf("lottery repeats (%0d)", repeat_windows));
    $display("permutation changed in %0d of %0d windows; lottery repeated an owner in %0d",
             changed_windows, WINDOWS - 1, repeat_windows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WINDOWS * N * L + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
