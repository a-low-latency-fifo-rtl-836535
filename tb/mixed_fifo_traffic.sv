// mixed_fifo_traffic: a mixed_clock_fifo with its own clocks, sender,
// receiver and scoreboard, for testing configurations side by side.
//
// The sender offers numbered items just after each clk_put edge (with
// probability PUT_PCT) and holds them while full; the receiver requests with
// probability GET_PCT. Valid items must come out once and in order; at the
// end the traffic stops and everything must drain (through dummy items if
// needed). Results are reported on the output ports when 'done' rises.
module mixed_fifo_traffic #(
  parameter int  FULL_SYNC    = 2,
  parameter int  EMPTY_SYNC   = 2,
  parameter int  EMPTY_MARGIN = 0,
  parameter int  FULL_MARGIN  = 0,
  parameter real HP_PUT       = 5.0,   // half periods in ns
  parameter real HP_GET       = 6.55,
  parameter int  PUT_PCT      = 70,
  parameter int  GET_PCT      = 70,
  parameter int  CYCLES       = 2000   // put-clock cycles of traffic
) (
  output int checks,
  output int failures,
  output int items,
  output int full_stalls,
  output int empty_stalls,
  output bit done
);
  localparam int W = 8;

  logic         clk_put = 0, clk_get = 0, rst_n = 0;
  logic         req_put = 0, req_get = 0;
  logic [W-1:0] data_put = '0;
  logic         full, empty, valid_get;
  logic [W-1:0] data_get;
  logic [W-1:0] q[$];
  logic [W-1:0] seq = 0;
  bit           have = 0, active = 1;

  mixed_clock_fifo #(
    .NCELLS(8), .DATA_W(W), .FULL_SYNC(FULL_SYNC), .EMPTY_SYNC(EMPTY_SYNC),
    .EMPTY_MARGIN(EMPTY_MARGIN), .FULL_MARGIN(FULL_MARGIN)
  ) u_dut (.*);

  always #(HP_PUT) clk_put = ~clk_put;
  initial begin
    #0.37;
    forever #(HP_GET) clk_get = ~clk_get;
  end

  initial begin
    checks = 0; failures = 0; items = 0; full_stalls = 0; empty_stalls = 0; done = 0;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %m %s t=%0t got=%0d exp=%0d", what, $time, got, exp);
    end
  endtask

  always @(posedge clk_put) if (rst_n) begin
    if (req_put && full) full_stalls++;
    if (req_put && !full) begin q.push_back(data_put); have = 0; end
    if (active && !have && ($urandom % 100) < PUT_PCT) begin
      seq++; data_put <= seq; have = 1;
    end
    req_put <= have;
  end

  always @(posedge clk_get) if (rst_n) begin
    if (req_get && empty) empty_stalls++;
    if (valid_get) begin
      if (q.size() == 0) check("valid read with no item", 1, 0);
      else begin check("data", data_get, q[0]); void'(q.pop_front()); end
      items++;
    end
    req_get <= !active || ($urandom % 100) < GET_PCT;
  end

  initial begin
    #23 rst_n = 1;
    repeat (CYCLES) @(posedge clk_put);
    active = 0;
    repeat (80) @(posedge clk_put);
    check("all items delivered", q.size(), 0);
    done = 1;
  end
endmodule
