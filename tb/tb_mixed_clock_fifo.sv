// tb_mixed_clock_fifo: the mixed-clock FIFO with two unrelated clocks,
// against a queue model of the valid items.
//
// The sender (clk_put) offers numbered items just after its clock edge and
// holds each while full is high; an item counts as enqueued at an edge where
// req_put was high and full low. The receiver (clk_get) requests at random;
// at an edge where valid_get was high it takes data_get, which must be the
// oldest item not yet read. Reads with valid_get low are dummy items.
// Phases:
//  1. receiver slower, both always active: one valid item on every
//     receiver cycle (full rate on the slow side);
//  2. sender slower, both always active: an item enqueued on every sender
//     cycle;
//  3. random traffic biased to fill (full stalls) and to drain (empty);
//  4. lone items with an idle sender: each must still come out, which
//     needs the deadlock detector's dummy item;
//  5. drain: nothing may stay behind.
// The test counts full stalls, empty stalls, dummy injections and dummy
// reads, and fails if any of them never happened.
module tb_mixed_clock_fifo;
  localparam int N = 8, W = 8;

  logic         clk_put = 0, clk_get = 0, rst_n = 0;
  logic         req_put = 0, req_get = 0;
  logic [W-1:0] data_put = '0;
  logic         full, empty, valid_get;
  logic [W-1:0] data_get;

  realtime hp_put = 5.0, hp_get = 6.55;
  int checks = 0, failures = 0;
  int n_put = 0, n_get = 0, n_full_stall = 0, n_empty_stall = 0;
  int n_dummy_in = 0, n_dummy_out = 0;
  logic [W-1:0] q[$];
  realtime      q_t[$];          // enqueue time of each queued item
  realtime      lat_min, lat_max, lat_sum;
  int           lat_n;
  int  put_prob = 0, get_prob = 0;
  logic [W-1:0] seq = 0;
  bit  have_item = 0;

  mixed_clock_fifo #(.NCELLS(N), .DATA_W(W)) u_dut (.*);

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

  // Sender.
  always @(posedge clk_put) if (rst_n) begin
    if (req_put && full) n_full_stall++;
    if (u_dut.en_put && !req_put) n_dummy_in++;
    if (req_put && !full) begin
      q.push_back(data_put);
      q_t.push_back($realtime);
      n_put++;
      have_item = 0;
    end
    if (!have_item && ($urandom % 100) < put_prob) begin
      seq++;
      data_put <= seq;
      have_item = 1;
    end
    req_put <= have_item;
  end

  // Receiver.
  always @(posedge clk_get) if (rst_n) begin
    if (req_get && empty) n_empty_stall++;
    if (valid_get) check("valid_get only on an enabled read", req_get && !empty, 1);
    if (req_get && !empty) begin
      if (valid_get) begin
        if (q.size() == 0) check("valid read with no item", 1, 0);
        else begin
          check("data", data_get, q[0]);
          void'(q.pop_front());
          if ($realtime - q_t[0] < lat_min) lat_min = $realtime - q_t[0];
          if ($realtime - q_t[0] > lat_max) lat_max = $realtime - q_t[0];
          lat_sum += $realtime - q_t[0];
          lat_n++;
          void'(q_t.pop_front());
        end
        n_get++;
      end else n_dummy_out++;
    end
    req_get <= ($urandom % 100) < get_prob;
  end

  task automatic lat_reset();
    lat_min = 1.0e9; lat_max = 0; lat_sum = 0; lat_n = 0;
  endtask

  task automatic lat_report(string what);
    if (lat_n > 0)
      $display("latency %s: items=%0d min=%0.2f avg=%0.2f max=%0.2f ns", what, lat_n, lat_min, lat_sum / lat_n, lat_max);
  endtask

  task automatic put_cycles(int n);
    repeat (n) @(posedge clk_put);
  endtask

  int p0, g0, d0, lone_ok;

  initial begin
    #23 rst_n = 1;
    // 1. receiver slower than sender, both always active.
    hp_put = 5.0; hp_get = 6.55; put_prob = 100; get_prob = 100;
    put_cycles(40);
    #0.1;
    g0 = n_get;
    repeat (40) @(posedge clk_get);
    #0.1;
    check("receiver reads every cycle (valid items in 40 cycles)", n_get - g0, 40);
    // 2. sender slower than receiver.
    hp_put = 6.55; hp_get = 5.0;
    put_cycles(40);
    #0.1;
    p0 = n_put;
    d0 = n_dummy_in;
    put_cycles(40);
    #0.1;
    check("sender writes every cycle (items in 40 cycles)", n_put - p0, 40);
    check("no dummy item in steady state", n_dummy_in - d0, 0);
    // 3. random traffic.
    hp_put = 5.0; hp_get = 7.3;
    put_prob = 90; get_prob = 40; put_cycles(300);
    put_prob = 30; get_prob = 90; put_cycles(300);
    hp_put = 8.1; hp_get = 5.0;
    put_prob = 70; get_prob = 70; put_cycles(300);
    // Latency with a light sender and an eager receiver (no backlog).
    hp_put = 5.0; hp_get = 5.0 * 1.31; put_prob = 30; get_prob = 100;
    put_cycles(50);
    lat_reset();
    put_cycles(400);
    lat_report("light load, put 10 ns, get 13.1 ns");
    // 4. lone items with an idle sender and an eager receiver.
    get_prob = 100; put_prob = 0;
    put_cycles(30);
    lone_ok = 0;
    lat_reset();
    for (int k = 0; k < 5; k++) begin
      put_prob = 100;
      @(posedge clk_put);
      put_prob = 0;
      put_cycles(30);
      if (q.size() == 0) lone_ok++;
    end
    check("lone items delivered", lone_ok, 5);
    lat_report("lone item via dummy, put 10 ns, get 13.1 ns");
    // 5. drain.
    put_prob = 0; get_prob = 100;
    put_cycles(60);
    check("all items delivered", q.size(), 0);
    checks++;
    if (n_full_stall == 0 || n_empty_stall == 0 || n_dummy_in == 0 || n_dummy_out == 0 || n_get < 400) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("mixed clock: items=%0d full stalls=%0d empty stalls=%0d dummies injected=%0d dummies read=%0d",
             n_get, n_full_stall, n_empty_stall, n_dummy_in, n_dummy_out);
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
