// tb_relay_station: a chain of three relay stations between a random
// sender and a receiver that raises its stop at random. The sender offers a
// numbered packet (valid or void) and keeps it while stop_out is high; the
// receiver takes a packet at every edge at which its stop was low. The
// testbench checks that exactly the sent packets arrive, in order, that the
// chain latency with no stop is one cycle per station, and that the stop
// path (auxiliary register in use) was exercised.
module tb_relay_station;
  localparam int W = 8, NST = 3;

  logic         clk = 0, rst_n = 0;
  logic [NST:0] valid, stop;
  logic [NST:0][W-1:0] data;
  int           checks = 0, failures = 0, n_recv = 0, n_stall = 0;
  int           cycle = 0;
  logic [W:0]   sent[$];     // {valid, data} in send order
  int           sent_cyc[$];

  for (genvar k = 0; k < NST; k++) begin : g_rs
    relay_station #(.DATA_W(W)) u_rs (
      .clk, .rst_n,
      .in_valid(valid[k]), .in_data(data[k]), .stop_out(stop[k]),
      .out_valid(valid[k+1]), .out_data(data[k+1]), .stop_in(stop[k+1]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(string what, logic [W:0] got, logic [W:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s t=%0t got=%h exp=%h", what, $time, got, exp);
    end
  endtask

  logic [W-1:0] seq = 0;
  bit           phase_random = 0;
  bit           taken = 0;       // the offered packet was taken at the last edge
  int           n_reset = 0;
  bit           sending = 1;     // record offered packets

  initial begin
    valid[0] = 0; data[0] = 0; stop[NST] = 0;
    #12 rst_n = 1;
    // Phase 1: no stop, every packet valid -> check the latency.
    // Phase 2: random stop and random void packets.
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      phase_random = (t >= 40);
      stop[NST] = phase_random ? ($urandom % 3 == 0) : 1'b0;
      if (taken) begin
        seq++;
        data[0]  = seq;
        valid[0] = phase_random ? 1'($urandom) : 1'b1;
      end
    end
    stop[NST] = 0;
    @(posedge clk);
    sending = 0;
    repeat (3 * NST + 4) @(negedge clk);
    checks++;
    if (n_recv < 300 || n_stall == 0 || sent.size() != 0) begin
      failures++;
      $display("FAIL coverage: received=%0d stalls=%0d left=%0d", n_recv, n_stall, sent.size());
    end
    $display("relay station: received=%0d stop cycles seen by sender=%0d", n_recv, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sender: the offered packet is taken at an edge where stop[0] was low.
  always @(posedge clk) if (rst_n) begin
    taken = !stop[0];
    if (!stop[0] && sending) begin
      sent.push_back({valid[0], data[0]});
      sent_cyc.push_back(cycle);
    end else n_stall++;
  end

  // Receiver: takes packetOut at every edge at which its stop was low. The
  // first NST packets are the void packets the chain holds after reset.
  always @(posedge clk) if (rst_n && !stop[NST]) begin
    if (n_reset < NST) begin
      check("reset packet", {valid[NST], data[NST]}, '0);
      n_reset++;
    end else if (sent.size() > 0) begin
      check("order", {valid[NST], data[NST]}, sent[0]);
      if (!phase_random) check("latency", W'(cycle - sent_cyc[0]), W'(NST));
      void'(sent.pop_front());
      void'(sent_cyc.pop_front());
      n_recv++;
    end
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
