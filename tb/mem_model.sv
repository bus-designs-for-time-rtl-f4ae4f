// mem_model -- behavioural model of main memory for the testbenches (not
// synthesizable).  Accepts one line request per cycle on the memory port of
// the memory controller and answers every request, reads and writes alike, in
// order, after a random latency of MIN_LAT..MAX_LAT cycles.  Lines never
// written read as init_line(addr).  `early_o` counts answers that came before
// MAX_LAT, i.e. memory jitter the controller must hide.
module mem_model
  import pta_bus_pkg::*;
#(
  parameter int MIN_LAT = 1,
  parameter int MAX_LAT = 15
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              req_valid_i,
  input  mem_req_t          req_i,
  output logic              rsp_valid_o,
  output logic [LINE_W-1:0] rsp_rdata_o,
  output int                served_o,
  output int                early_o
);

  logic [LINE_W-1:0] store [logic [ADDR_W-1:0]];
  logic [LINE_W-1:0] pend_d [$];
  longint            pend_t [$];
  longint            now = 0;
  longint            last_due = 0;

  function automatic logic [LINE_W-1:0] init_line(input logic [ADDR_W-1:0] a);
    logic [LINE_W-1:0] v;
    for (int i = 0; i < LINE_W / 32; i++) v[i*32 +: 32] = a ^ (32'h9E37_79B9 * (i + 1));
    return v;
  endfunction

  initial begin
    rsp_valid_o = 1'b0;
    rsp_rdata_o = '0;
    served_o = 0;
    early_o = 0;
  end

  always @(posedge clk_i) begin
    now <= now + 1;
    rsp_valid_o <= 1'b0;
    if (rst_ni) begin
      if (req_valid_i) begin
        longint due;
        int lat;
        lat = $urandom_range(MIN_LAT, MAX_LAT);
        due = now + longint'(lat);
        if (due <= last_due) due = last_due + 1;
        if (due - now < longint'(MAX_LAT)) early_o <= early_o + 1;
        last_due = due;
        if (req_i.we) begin
          store[req_i.addr] = req_i.wdata;
          pend_d.push_back('0);
        end else begin
          pend_d.push_back(store.exists(req_i.addr) ? store[req_i.addr] : init_line(req_i.addr));
        end
        pend_t.push_back(due);
      end
      // The answer is visible in cycle `due` (request seen in cycle now).
      if (pend_t.size() > 0 && pend_t[0] == now + 1) begin
        rsp_valid_o <= 1'b1;
        rsp_rdata_o <= pend_d.pop_front();
        void'(pend_t.pop_front());
        served_o <= served_o + 1;
      end
    end
  end

endmodule
