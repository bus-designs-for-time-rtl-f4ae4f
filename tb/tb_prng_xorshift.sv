// tb_prng_xorshift -- checks the xorshift32 generator against an independent
// software model: reset seed, stepping only on next_i, seed loading, the
// zero-seed fallback, and that the state never becomes zero.
module tb_prng_xorshift;
  logic        clk = 0, rst_n = 0, seed_we = 0, next = 0;
  logic [31:0] seed = '0, rnd;
  int checks = 0, failures = 0;

  prng_xorshift #(.SEED(32'hDEAD_BEEF)) dut (
    .clk_i(clk), .rst_ni(rst_n), .seed_we_i(seed_we), .seed_i(seed), .next_i(next), .rnd_o(rnd));

  always #5 clk = ~clk;

  function automatic logic [31:0] ref_step(input logic [31:0] x);
    logic [31:0] y;
    y = x;
    y = y ^ {y[18:0], 13'd0};
    y = y ^ {17'd0, y[31:17]};
    y = y ^ {y[26:0], 5'd0};
    return y;
  endfunction

  task automatic check(input logic [31:0] exp, input string what);
    checks++;
    if (rnd !== exp) begin
      failures++;
      $display("FAIL %s: got %08h exp %08h", what, rnd, exp);
    end
  endtask

  logic [31:0] model;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    model = 32'hDEAD_BEEF;
    check(model, "reset seed");
    for (int i = 0; i < 500; i++) begin
      next = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (next) model = ref_step(model);
      check(model, "step");
      checks++;
      if (rnd == 0) failures++;
    end
    next = 1; seed_we = 1; seed = 32'h0000_0001;
    @(posedge clk); #1;
    seed_we = 0; next = 0;
    model = 32'h1;
    check(model, "seed load has priority");
    seed_we = 1; seed = 32'h0;
    @(posedge clk); #1;
    seed_we = 0;
    model = 32'h2545_F491;
    check(model, "zero seed fallback");
    next = 1;
    for (int i = 0; i < 100; i++) begin
      @(posedge clk); #1;
      model = ref_step(model);
      check(model, "step after reseed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
