// tb_single_clock_fifo: the single-clock FIFO against a queue model.
//
// The sender offers numbered items and holds each while full is high; an
// item is taken at an edge where req_put was high and full low. The receiver
// raises req_get at random and takes data_get at an edge where valid_get was
// high. Checked:
//  - every item arrives once, in order (scoreboard);
//  - full / empty after each edge equal "all NCELLS places used" / "no item";
//  - latency: with the receiver always asking, an item taken at edge k is
//    read at edge k+1;
//  - throughput: with both sides always asking, one item per cycle;
//  - full stalls and empty stalls both happen.
module tb_single_clock_fifo;
  localparam int N = 8, W = 8;

  logic         clk = 0, rst_n = 0;
  logic         req_put = 0, req_get = 0;
  logic [W-1:0] data_put = '0;
  logic         full, empty, valid_get;
  logic [W-1:0] data_get;

  int checks = 0, failures = 0, cycle = 0;
  int n_put = 0, n_get = 0, n_full_stall = 0, n_empty_stall = 0, n_full_seen = 0;
  logic [W-1:0] q[$];
  int           q_cyc[$];
  int           put_prob = 50, get_prob = 50;
  bit           check_latency = 0;
  logic [W-1:0] seq = 0;
  int           g0;

  single_clock_fifo #(.NCELLS(N), .DATA_W(W)) u_dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s t=%0t got=%0d exp=%0d", what, $time, got, exp);
    end
  endtask

  // Everything that happens at an edge, seen with the values before it;
  // then the sender and receiver drive their next request just after the
  // edge (non-blocking), as the interface protocol asks.
  bit have_item = 0;
  always @(posedge clk) if (rst_n) begin
    bit put_ok, get_ok;
    cycle++;
    put_ok = req_put && !full;
    get_ok = valid_get;
    if (req_put && full) n_full_stall++;
    if (req_get && empty) n_empty_stall++;
    check("valid_get = req_get & ~empty", valid_get, req_get && !empty);
    if (get_ok) begin
      if (q.size() == 0) check("read from empty FIFO", 1, 0);
      else begin
        check("data", data_get, q[0]);
        if (check_latency) check("latency", cycle - q_cyc[0], 1);
        void'(q.pop_front());
        void'(q_cyc.pop_front());
      end
      n_get++;
    end
    if (put_ok) begin
      q.push_back(data_put);
      q_cyc.push_back(cycle);
      n_put++;
      have_item = 0;
    end
    if (!have_item && ($urandom % 100) < put_prob) begin
      seq++;
      data_put <= seq;
      have_item = 1;
    end
    req_put <= have_item;
    req_get <= ($urandom % 100) < get_prob;
  end

  // Registered flags, checked in the middle of the cycle.
  always @(negedge clk) if (rst_n) begin
    check("full flag", full, q.size() == N);
    check("empty flag", empty, q.size() == 0);
    if (full) n_full_seen++;
  end

  initial begin
    #22 rst_n = 1;
    // Phase 1: receiver always asks -> one-cycle latency.
    get_prob = 100; put_prob = 40;
    repeat (3) @(posedge clk);
    check_latency = 1;
    repeat (100) @(posedge clk);
    check_latency = 0;
    // Phase 2: both always ask -> one item per cycle.
    put_prob = 100;
    repeat (10) @(posedge clk);
    g0 = n_get;
    repeat (50) @(posedge clk);
    check("throughput (items in 50 cycles)", n_get - g0, 50);
    // Phase 3: sender faster -> full; phase 4: receiver faster -> empty.
    put_prob = 90; get_prob = 30;
    repeat (300) @(posedge clk);
    put_prob = 30; get_prob = 90;
    repeat (300) @(posedge clk);
    put_prob = 60; get_prob = 60;
    repeat (300) @(posedge clk);
    put_prob = 0; get_prob = 100;
    repeat (20) @(posedge clk);
    check("all items delivered", q.size(), 0);
    checks++;
    if (n_full_stall == 0 || n_empty_stall == 0 || n_full_seen == 0 || n_get < 300) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("single clock: items=%0d full stalls=%0d empty stalls=%0d", n_get, n_full_stall, n_empty_stall);
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
