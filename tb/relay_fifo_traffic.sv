// relay_fifo_traffic: a relay_station_fifo with its own clocks, packet
// source, packet sink and scoreboard, for testing configurations side by
// side.
//
// The source offers a packet after every clk_put edge at which the previous
// one was taken (stop_out low): a numbered valid packet with probability
// VALID_PCT, otherwise a void one. The sink raises stop_in with probability
// STOP_PCT. Every valid packet must come out once and in order, and none
// while stop_in is high. At the end only void packets are sent and
// everything must drain. Results are reported on the outputs when 'done'
// rises.
module relay_fifo_traffic #(
  parameter int  FULL_MARGIN  = 0,
  parameter int  EMPTY_MARGIN = 0,
  parameter real HP_PUT       = 5.0,   // half periods in ns
  parameter real HP_GET       = 6.55,
  parameter int  VALID_PCT    = 70,
  parameter int  STOP_PCT     = 20,
  parameter int  CYCLES       = 2000   // put-clock cycles of traffic
) (
  output int checks,
  output int failures,
  output int items,
  output int stop_out_cycles,
  output int void_out,
  output bit done
);
  localparam int W = 8;

  logic         clk_put = 0, clk_get = 0, rst_n = 0;
  logic         req_put = 0, stop_in = 0;
  logic [W-1:0] data_put = '0;
  logic         stop_out, valid_get;
  logic [W-1:0] data_get;
  logic [W-1:0] q[$];
  logic [W-1:0] seq = 0;
  bit           active = 1;

  relay_station_fifo #(
    .NCELLS(8), .DATA_W(W), .FULL_MARGIN(FULL_MARGIN), .EMPTY_MARGIN(EMPTY_MARGIN)
  ) u_dut (.*);

  always #(HP_PUT) clk_put = ~clk_put;
  initial begin
    #0.37;
    forever #(HP_GET) clk_get = ~clk_get;
  end

  initial begin
    checks = 0; failures = 0; items = 0; stop_out_cycles = 0; void_out = 0; done = 0;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %m %s t=%0t got=%0d exp=%0d", what, $time, got, exp);
    end
  endtask

  always @(posedge clk_put) if (rst_n) begin
    if (stop_out) stop_out_cycles++;
    else begin
      if (req_put) q.push_back(data_put);
      if (active && ($urandom % 100) < VALID_PCT) begin
        seq++;
        data_put <= seq;
        req_put  <= 1'b1;
      end else req_put <= 1'b0;
    end
  end

  always @(posedge clk_get) if (rst_n) begin
    if (stop_in) check("no valid packet while stopped", valid_get, 0);
    else if (valid_get) begin
      if (q.size() == 0) check("valid packet with nothing sent", 1, 0);
      else begin check("data", data_get, q[0]); void'(q.pop_front()); end
      items++;
    end else void_out++;
    stop_in <= active && ($urandom % 100) < STOP_PCT;
  end

  initial begin
    #23 rst_n = 1;
    repeat (CYCLES) @(posedge clk_put);
    active = 0;
    repeat (80) @(posedge clk_put);
    check("all valid packets delivered", q.size(), 0);
    done = 1;
  end
endmodule
