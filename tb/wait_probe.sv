// wait_probe -- measures the distribution of the number of whole rounds a
// request waits on a pta_bus and compares it with the analytic model (not
// synthesizable).  Contender 0 raises a request exactly at a round boundary,
// after a random gap of 0..2N rounds, and records k = (grant - arrival) / L.
// The other contenders are idle, or (SATURATE = 1) always requesting: with
// time-composable arbitration the distribution must be the same.
//   random permutations: P(k) = max(N-k,0)/N^2 + sum_{i=max(1,N-k)}^{min(N-1,2N-k-1)} i/N^3,
//                        0 <= k <= 2N-2 (arrival round uniform in the window)
//   lottery:             P(k) = (1 - 1/N)^k / N
//   round robin:         P(k) = 1/N, 0 <= k <= N-1 (contender 0 owns round 0)
// Each P(k) must match within 0.015 and the mean within 3 %.
module wait_probe
  import pta_bus_pkg::*;
#(
  parameter int          N        = 4,
  parameter int          L        = 8,
  parameter arb_policy_e POLICY   = ARB_RANDPERM,
  parameter bit          SATURATE = 0,
  parameter int          SAMPLES  = 20000,
  parameter logic [31:0] SEED     = 32'h1
) (
  input  logic clk_i,
  input  logic rst_ni,
  output logic done_o,
  output int   checks_o,
  output int   failures_o,
  output real  mean_o,
  output real  model_mean_o
);

  localparam int KMAX = 64;

  logic [N-1:0] v, r;
  bus_req_t     q [N];
  logic         ov, rs, ws, busy;
  bus_req_t     o;
  logic [((N > 1) ? $clog2(N) : 1)-1:0] own;

  pta_bus #(.N(N), .L(L), .POLICY(POLICY), .SEED(SEED)) u_bus (
    .clk_i, .rst_ni, .seed_we_i(1'b0), .seed_i(32'd0),
    .req_valid_i(v), .req_i(q), .req_ready_o(r),
    .out_valid_o(ov), .out_o(o), .out_ready_i(1'b1),
    .round_start_o(rs), .window_start_o(ws), .owner_o(own), .busy_o(busy));

  int  hist [KMAX+1];
  int  n = 0, phase = -1, target = 0, ridx = 0, t_arr = 0, cyc = 0;
  bit  pending = 0, need_nw = 1;

  function automatic real model_p(input int k);
    real p = 0.0;
    if (POLICY == ARB_RANDPERM) begin
      if (k > 2 * N - 2) return 0.0;
      p = real'((N - k > 0) ? N - k : 0) / real'(N * N);
      for (int i = ((N - k > 1) ? N - k : 1); i <= ((N - 1 < 2 * N - k - 1) ? N - 1 : 2 * N - k - 1); i++)
        p += real'(i) / real'(N * N * N);
      return p;
    end
    if (POLICY == ARB_RR) return (k < N) ? 1.0 / real'(N) : 0.0;
    return ((1.0 - 1.0 / real'(N)) ** k) / real'(N);
  endfunction

  initial begin
    done_o = 0; checks_o = 0; failures_o = 0; mean_o = 0.0; model_mean_o = 0.0;
    v = '0;
    for (int i = 0; i < N; i++) q[i] = '0;
    for (int k = 0; k <= KMAX; k++) hist[k] = 0;
  end

  always @(posedge clk_i) begin
    cyc <= cyc + 1;
    if (rst_ni && !done_o) begin
      if (r[0]) begin
        int k;
        k = (cyc - t_arr) / L;
        checks_o++;
        if ((cyc - t_arr) % L != 0) begin
          failures_o++;
          $display("FAIL request raised at a round start granted off a round start");
        end
        hist[(k > KMAX) ? KMAX : k]++;
        n++;
        pending = 0;
        need_nw = 1;
        target = $urandom_range(0, N - 1);
      end
      if (rs) begin
        phase = 0;
        ridx = ws ? 0 : (ridx + 1) % N;
      end else if (phase >= 0) phase++;
      // Raise the request so that it is first seen at the next round start.
      v[0] <= pending && !r[0];
      if (phase == L - 1) begin
        int next_idx;
        next_idx = (ridx + 1) % N;
        if (need_nw && next_idx == 0) need_nw = 0;
        if (!pending && !need_nw && next_idx == target) begin
          pending = 1;
          v[0] <= 1'b1;
          q[0] <= '{src: '0, we: 1'b0, addr: 32'(n), wdata: '0};
          t_arr = cyc + 1;
        end
      end
      for (int i = 1; i < N; i++) v[i] <= SATURATE;
      if (n == SAMPLES) begin
        real m = 0.0, mm = 0.0;
        for (int k = 0; k < KMAX; k++) begin
          real emp;
          emp = real'(hist[k]) / real'(SAMPLES);
          m += real'(k) * emp;
          mm += real'(k) * model_p(k);
          checks_o++;
          if (emp - model_p(k) > 0.015 || model_p(k) - emp > 0.015) begin
            failures_o++;
            $display("FAIL N=%0d policy=%s k=%0d: measured %f model %f", N, POLICY.name(), k, emp, model_p(k));
          end
        end
        checks_o++;
        if (m > mm * 1.03 || m < mm * 0.97) begin
          failures_o++;
          $display("FAIL N=%0d policy=%s mean wait %f rounds, model %f", N, POLICY.name(), m, mm);
        end
        mean_o <= m;
        model_mean_o <= mm;
        done_o <= 1'b1;
      end
    end
  end

endmodule
