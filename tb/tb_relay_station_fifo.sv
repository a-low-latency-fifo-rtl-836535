// tb_relay_station_fifo: the relay-station FIFO between two clock domains.
//
// The left side (clk_put) offers a packet on every cycle: a numbered item
// with its valid bit, or a void packet. A packet counts as taken at an edge
// where stop_out was low; otherwise it is offered again. The right side
// (clk_get) takes a packet at every edge at which its stop_in was low; the
// valid ones must be exactly the valid packets sent, in order. Checked as
// well: no valid packet while stop_in is high; full rate on the slower side
// when nothing is stopped; back-pressure (stop_out) and stop_in both used;
// nothing left behind at the end.
module tb_relay_station_fifo;
  localparam int N = 8, W = 8;

  logic         clk_put = 0, clk_get = 0, rst_n = 0;
  logic         req_put = 0, stop_in = 0;
  logic [W-1:0] data_put = '0;
  logic         stop_out, valid_get;
  logic [W-1:0] data_get;

  realtime hp_put = 5.0, hp_get = 6.55;
  int checks = 0, failures = 0;
  int n_sent = 0, n_recv = 0, n_void_in = 0, n_void_out = 0, n_stop_out = 0, n_stop_in = 0;
  logic [W-1:0] q[$];
  int  valid_prob = 100, stop_prob = 0;
  logic [W-1:0] seq = 0;

  relay_station_fifo #(.NCELLS(N), .DATA_W(W)) u_dut (.*);

  always #(hp_put) clk_put = ~clk_put;
  initial begin
    #0.37;
    forever #(hp_get) clk_get = ~clk_get;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s t=%0t got=%0d exp=%0d", what, $time, got, exp);
    end
  endtask

  // Left side: a new packet after each edge at which the last one was taken.
  always @(posedge clk_put) if (rst_n) begin
    if (stop_out) n_stop_out++;
    else begin
      if (req_put) begin
        q.push_back(data_put);
        n_sent++;
      end else n_void_in++;
      if (($urandom % 100) < valid_prob) begin
        seq++;
        data_put <= seq;
        req_put  <= 1'b1;
      end else begin
        req_put  <= 1'b0;
      end
    end
  end

  // Right side.
  always @(posedge clk_get) if (rst_n) begin
    if (stop_in) begin
      n_stop_in++;
      check("no valid packet while stopped", valid_get, 0);
    end else if (valid_get) begin
      if (q.size() == 0) check("valid packet with nothing sent", 1, 0);
      else begin
        check("data", data_get, q[0]);
        void'(q.pop_front());
      end
      n_recv++;
    end else n_void_out++;
    stop_in <= ($urandom % 100) < stop_prob;
  end

  int p0, g0;

  initial begin
    #23 rst_n = 1;
    // Receiver side slower: a valid packet on every right-side cycle.
    hp_put = 5.0; hp_get = 6.55; valid_prob = 100; stop_prob = 0;
    repeat (40) @(posedge clk_put);
    #0.1 g0 = n_recv;
    repeat (40) @(posedge clk_get);
    #0.1 check("valid packet every right-side cycle", n_recv - g0, 40);
    // Sender side slower: never stopped, a packet taken every left cycle.
    hp_put = 6.55; hp_get = 5.0;
    repeat (40) @(posedge clk_put);
    #0.1 p0 = n_sent;
    repeat (40) @(posedge clk_put);
    #0.1 check("packet taken every left-side cycle", n_sent - p0, 40);
    // Random void packets and random stops, both speed orders.
    valid_prob = 60; stop_prob = 40;
    repeat (400) @(posedge clk_put);
    hp_put = 5.0; hp_get = 7.7; stop_prob = 20;
    repeat (400) @(posedge clk_put);
    // Drain with void packets only.
    valid_prob = 0; stop_prob = 0;
    repeat (60) @(posedge clk_put);
    check("all valid packets delivered", q.size(), 0);
    checks++;
    if (n_stop_out == 0 || n_stop_in == 0 || n_void_in == 0 || n_void_out == 0 || n_recv < 400) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("relay-station FIFO: valid=%0d stop_out cycles=%0d stop_in cycles=%0d void in=%0d void out=%0d",
             n_recv, n_stop_out, n_stop_in, n_void_in, n_void_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
