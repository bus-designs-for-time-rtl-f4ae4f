// tb_wait_distribution -- checks the bus's waiting-time distribution against
// the analytic models of the arbitration policies: random permutations with
// N = 4, 8 and 16 contenders (mean waits of about 1.8, 4.2 and 8.8 rounds,
// never more than 2N-2), the same with the other contenders saturating the
// bus (time composability: nothing may change), the lottery with N = 4
// (geometric, mean N-1 = 3 rounds) and the deterministic round robin with
// N = 4 (uniform over 0..N-1 rounds, mean 1.5).  Rounds of L = 8 cycles.
module tb_wait_distribution;
  import pta_bus_pkg::*;
  localparam int NP = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic done [NP];
  int   checks [NP], failures [NP];
  real  mean [NP], model [NP];

  wait_probe #(.N(4),  .POLICY(ARB_RANDPERM), .SATURATE(0), .SEED(32'h1111_0001)) p0 (
    .clk_i(clk), .rst_ni(rst_n), .done_o(done[0]), .checks_o(checks[0]), .failures_o(failures[0]), .mean_o(mean[0]), .model_mean_o(model[0]));
  wait_probe #(.N(8),  .POLICY(ARB_RANDPERM), .SATURATE(0), .SEED(32'h2222_0002)) p1 (
    .clk_i(clk), .rst_ni(rst_n), .done_o(done[1]), .checks_o(checks[1]), .failures_o(failures[1]), .mean_o(mean[1]), .model_mean_o(model[1]));
  wait_probe #(.N(16), .POLICY(ARB_RANDPERM), .SATURATE(0), .SEED(32'h3333_0003)) p2 (
    .clk_i(clk), .rst_ni(rst_n), .done_o(done[2]), .checks_o(checks[2]), .failures_o(failures[2]), .mean_o(mean[2]), .model_mean_o(model[2]));
  wait_probe #(.N(4),  .POLICY(ARB_RANDPERM), .SATURATE(1), .SEED(32'h4444_0004)) p3 (
    .clk_i(clk), .rst_ni(rst_n), .done_o(done[3]), .checks_o(checks[3]), .failures_o(failures[3]), .mean_o(mean[3]), .model_mean_o(model[3]));
  wait_probe #(.N(4),  .POLICY(ARB_LOTTERY),  .SATURATE(0), .SEED(32'h5555_0005)) p4 (
    .clk_i(clk), .rst_ni(rst_n), .done_o(done[4]), .checks_o(checks[4]), .failures_o(failures[4]), .mean_o(mean[4]), .model_mean_o(model[4]));
  wait_probe #(.N(4),  .POLICY(ARB_RR),       .SATURATE(1), .SEED(32'h6666_0006)) p5 (
    .clk_i(clk), .rst_ni(rst_n), .done_o(done[5]), .checks_o(checks[5]), .failures_o(failures[5]), .mean_o(mean[5]), .model_mean_o(model[5]));

  localparam string NAME [NP] = '{"randperm N=4", "randperm N=8", "randperm N=16",
                                  "randperm N=4, others saturating", "lottery N=4",
                                  "round robin N=4, others saturating"};

  function automatic bit all_done();
    for (int k = 0; k < NP; k++) if (!done[k]) return 0;
    return 1;
  endfunction

  initial begin
    int tc = 0, tf = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (!all_done()) @(posedge clk);
    #1;
    for (int k = 0; k < NP; k++) begin
      tc += checks[k];
      tf += failures[k];
      $display("%-32s mean wait %5.3f rounds (model %5.3f)", NAME[k], mean[k], model[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=1 failures=1");
    $finish;
  end
endmodule
