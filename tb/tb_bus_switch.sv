// tb_bus_switch -- checks the cluster switch with S = 1 and S = 3, depth 4.
// Transactions are offered at random and taken at random.  Checks: nothing is
// lost, duplicated or reordered; a transaction reaches the output no earlier
// than S cycles after it was accepted, and exactly S cycles after when
// nothing is queued in front of it; in_ready_o drops when the queue (with what
// is still crossing) is full, and transactions then queue up.
module tb_bus_switch;
  import pta_bus_pkg::*;
  localparam int CYCLES = 20000;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  logic     iv [2], ir [2], ov [2], orr [2];
  bus_req_t id [2], od [2];

  bus_switch #(.S(1), .DEPTH(4)) dut1 (.clk_i(clk), .rst_ni(rst_n),
    .in_valid_i(iv[0]), .in_i(id[0]), .in_ready_o(ir[0]),
    .out_valid_o(ov[0]), .out_o(od[0]), .out_ready_i(orr[0]));
  bus_switch #(.S(3), .DEPTH(4)) dut3 (.clk_i(clk), .rst_ni(rst_n),
    .in_valid_i(iv[1]), .in_i(id[1]), .in_ready_o(ir[1]),
    .out_valid_o(ov[1]), .out_o(od[1]), .out_ready_i(orr[1]));

  bus_req_t q_d [2][$];
  int       q_t [2][$];
  int       backpressure [2], exact [2], moved [2];
  localparam int SL [2] = '{1, 3};

  always @(posedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < 2; k++) begin
        // Head of the queue: hidden before S cycles, visible from then on.
        if (q_t[k].size() > 0) begin
          chk(ov[k] == (cyc >= q_t[k][0] + SL[k]), "head visible exactly S cycles after entry");
          if (cyc == q_t[k][0] + SL[k] && ov[k]) exact[k]++;
        end else chk(!ov[k], "no output when empty");
        if (iv[k] && !ir[k]) begin
          backpressure[k]++;
          chk(q_d[k].size() >= 4, "in_ready low only when full");
        end
        if (ov[k] && orr[k]) begin
          chk(q_d[k].size() > 0, "output without input");
          if (q_d[k].size() > 0) begin
            bus_req_t e;
            e = q_d[k].pop_front();
            void'(q_t[k].pop_front());
            chk(od[k] == e, "order and payload");
            moved[k]++;
          end
        end
        if (iv[k] && ir[k]) begin
          q_d[k].push_back(id[k]);
          q_t[k].push_back(cyc);
        end
        if (!iv[k] || ir[k]) begin
          iv[k] <= ($urandom_range(0, 2) == 0);
          id[k] <= '{src: ID_W'($urandom), we: 1'($urandom), addr: $urandom, wdata: {16{$urandom}}};
        end
        orr[k] <= (cyc < CYCLES / 2) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      end
    end
  end

  initial begin
    for (int k = 0; k < 2; k++) begin
      iv[k] = 0; orr[k] = 0; id[k] = '0;
      backpressure[k] = 0; exact[k] = 0; moved[k] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (cyc >= CYCLES);
    @(posedge clk); #1;
    for (int k = 0; k < 2; k++) begin
      chk(moved[k] > 1000, $sformatf("S=%0d transactions moved (%0d)", SL[k], moved[k]));
      chk(backpressure[k] > 0, "queue filled up");
      chk(exact[k] > 0, "transactions crossing an empty switch");
      $display("S=%0d: %0d moved, %0d back-pressure cycles, %0d crossed an empty switch",
               SL[k], moved[k], backpressure[k], exact[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
