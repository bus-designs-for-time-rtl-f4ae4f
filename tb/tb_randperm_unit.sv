// tb_randperm_unit -- checks the hierarchical swap network of the randperm
// register.  Reference: after the swaps, the id that was in slot p moves to
// slot p XOR sum_k(b_k(p) << k), where b_k(p) is the level-k random bit of the
// 2^(k+1)-wide block holding p.  Checks the worked N = 4 example
// (00-01-10-11 with randbits 101 gives order 2,3,1,0), every randbits value for
// N = 4 and N = 8 from random starting orders, that the result is always a
// permutation, and that over all randbits each id reaches each slot exactly
// 2^(N-1)/N times (probability exactly 1/N).
module tb_randperm_unit;
  logic clk = 0, rst_n = 0;
  logic upd4 = 0, upd8 = 0;
  logic [2:0]  rb4 = '0;
  logic [6:0]  rb8 = '0;
  logic [7:0]  perm4;
  logic [23:0] perm8;
  int checks = 0, failures = 0;

  randperm_unit #(.N(4)) dut4 (.clk_i(clk), .rst_ni(rst_n), .update_i(upd4), .randbits_i(rb4), .perm_o(perm4));
  randperm_unit #(.N(8)) dut8 (.clk_i(clk), .rst_ni(rst_n), .update_i(upd8), .randbits_i(rb8), .perm_o(perm8));

  always #5 clk = ~clk;

  // Reference: new slot of the id sitting in slot p.
  function automatic int new_slot(input int n, input int p, input logic [31:0] rb);
    int q = p, off = 0, lv = 0;
    for (int sz = 2; sz <= n; sz *= 2) begin
      if (rb[off + p / sz]) q = q ^ (sz / 2);
      off += n / sz;
      lv++;
    end
    return q;
  endfunction

  function automatic bit is_perm(input int n, input logic [31:0] v [8]);
    bit [7:0] seen = '0;
    for (int p = 0; p < n; p++) seen[v[p][2:0]] = 1'b1;
    return seen == 8'((1 << n) - 1);
  endfunction

  logic [31:0] v_old [8];
  logic [31:0] v_new  [8];
  logic [31:0] expv   [8];
  int hits [8][8];

  task automatic read4(output logic [31:0] v [8]);
    for (int p = 0; p < 8; p++) v[p] = (p < 4) ? 32'(perm4[p*2 +: 2]) : 32'd0;
  endtask
  task automatic read8(output logic [31:0] v [8]);
    for (int p = 0; p < 8; p++) v[p] = 32'(perm8[p*3 +: 3]);
  endtask

  task automatic run_case(input int n, input logic [31:0] rb);
    if (n == 4) read4(v_old); else read8(v_old);
    for (int p = 0; p < n; p++) expv[new_slot(n, p, rb)] = v_old[p];
    if (n == 4) begin rb4 = rb[2:0]; upd4 = 1; end
    else        begin rb8 = rb[6:0]; upd8 = 1; end
    @(posedge clk); #1;
    upd4 = 0; upd8 = 0;
    if (n == 4) read4(v_new); else read8(v_new);
    checks++;
    if (!is_perm(n, v_new)) begin failures++; $display("FAIL N=%0d not a permutation", n); end
    for (int p = 0; p < n; p++) begin
      checks++;
      if (v_new[p] != expv[p]) begin
        failures++;
        $display("FAIL N=%0d rb=%0h slot %0d got %0d exp %0d", n, rb, p, v_new[p], expv[p]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // Reset value is the identity order.
    read4(v_new);
    for (int p = 0; p < 4; p++) begin checks++; if (v_new[p] != p) failures++; end
    // Worked example: 00-01-10-11, randbits 1,0,1 -> 10-11-01-00.
    run_case(4, 32'b101);
    checks++;
    if (perm4 != {2'b00, 2'b01, 2'b11, 2'b10}) begin
      failures++; $display("FAIL worked example: %b", perm4);
    end
    // No update, no change.
    rb4 = 3'b111;
    @(posedge clk); #1;
    checks++;
    if (perm4 != {2'b00, 2'b01, 2'b11, 2'b10}) begin failures++; $display("FAIL changed without update"); end
    // Every randbits value from a chain of random orders.
    for (int r = 0; r < 64; r++) run_case(4, 32'($urandom_range(0, 7)));
    for (int rb = 0; rb < 8; rb++) run_case(4, 32'(rb));
    for (int r = 0; r < 200; r++) run_case(8, 32'($urandom_range(0, 127)));
    // Uniformity: from one fixed starting order, every randbits value.
    read8(v_old);
    for (int i = 0; i < 8; i++) for (int s = 0; s < 8; s++) hits[i][s] = 0;
    for (int rb = 0; rb < 128; rb++)
      for (int p = 0; p < 8; p++) hits[v_old[p]][new_slot(8, p, 32'(rb))]++;
    for (int i = 0; i < 8; i++) for (int s = 0; s < 8; s++) begin
      checks++;
      if (hits[i][s] != 16) begin failures++; $display("FAIL uniformity id %0d slot %0d: %0d", i, s, hits[i][s]); end
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
