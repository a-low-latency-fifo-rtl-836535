// tb_lowlat_fifo_top: end-to-end test of the whole top level at its default
// parameters (8 places of 8 bits, one relay station on each side of the
// relay-station FIFO).
//
// Three independent traffic generators and scoreboards run at once:
//  - single-clock FIFO on sc_clk;
//  - mixed-clock FIFO with the receiver clock slower, then faster;
//  - relay-station link: sender -> relay station (rs_clk_put) -> FIFO ->
//    relay station (rs_clk_get) -> receiver, with random void packets and
//    random receiver stops.
// Every valid item must arrive once and in order. Each mechanism of the
// design is counted and must happen at least once: full stall and empty
// stall (both FIFOs with requests), dummy injection and dummy read (mixed
// clock), FIFO back-pressure (relay-station FIFO full), relay-station
// stalls on both clock sides, and void packets.
module tb_lowlat_fifo_top;
  localparam int W = 8;

  logic rst_n = 0;
  logic sc_clk = 0, mc_clk_put = 0, mc_clk_get = 0, rs_clk_put = 0, rs_clk_get = 0;
  logic         sc_req_put = 0, sc_req_get = 0, mc_req_put = 0, mc_req_get = 0;
  logic [W-1:0] sc_data_put = '0, mc_data_put = '0, rs_in_data = '0;
  logic         rs_in_valid = 0, rs_out_stop = 0;
  logic         sc_full, sc_empty, sc_valid_get, mc_full, mc_empty, mc_valid_get;
  logic         rs_in_stop, rs_out_valid;
  logic [W-1:0] sc_data_get, mc_data_get, rs_out_data;

  lowlat_fifo_top u_top (.*);

  realtime hp_mp = 5.0, hp_mg = 6.55;
  always #5 sc_clk = ~sc_clk;
  always #(hp_mp) mc_clk_put = ~mc_clk_put;
  initial begin #0.37; forever #(hp_mg) mc_clk_get = ~mc_clk_get; end
  always #6.1 rs_clk_put = ~rs_clk_put;
  initial begin #0.53; forever #(4.45) rs_clk_get = ~rs_clk_get; end

  int checks = 0, failures = 0;
  int prob_put = 70, prob_get = 70, prob_stop = 30, prob_valid = 70;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s t=%0t got=%0d exp=%0d", what, $time, got, exp);
    end
  endtask

  // ---------------- single-clock FIFO ----------------
  logic [W-1:0] sc_q[$];
  logic [W-1:0] sc_seq = 0;
  bit sc_have = 0;
  int sc_items = 0, sc_full_stall = 0, sc_empty_stall = 0;
  always @(posedge sc_clk) if (rst_n) begin
    if (sc_req_put && sc_full) sc_full_stall++;
    if (sc_req_get && sc_empty) sc_empty_stall++;
    if (sc_valid_get) begin
      if (sc_q.size() == 0) check("sc read with no item", 1, 0);
      else begin check("sc data", sc_data_get, sc_q[0]); void'(sc_q.pop_front()); end
      sc_items++;
    end
    if (sc_req_put && !sc_full) begin sc_q.push_back(sc_data_put); sc_have = 0; end
    if (!sc_have && ($urandom % 100) < prob_put) begin
      sc_seq++; sc_data_put <= sc_seq; sc_have = 1;
    end
    sc_req_put <= sc_have;
    sc_req_get <= ($urandom % 100) < prob_get;
  end

  // ---------------- mixed-clock FIFO ----------------
  logic [W-1:0] mc_q[$];
  logic [W-1:0] mc_seq = 0;
  bit mc_have = 0;
  int mc_items = 0, mc_full_stall = 0, mc_empty_stall = 0, mc_dummy_in = 0, mc_dummy_out = 0;
  always @(posedge mc_clk_put) if (rst_n) begin
    if (mc_req_put && mc_full) mc_full_stall++;
    if (u_top.u_mc_fifo.en_put && !mc_req_put) mc_dummy_in++;
    if (mc_req_put && !mc_full) begin mc_q.push_back(mc_data_put); mc_have = 0; end
    if (!mc_have && ($urandom % 100) < prob_put) begin
      mc_seq++; mc_data_put <= mc_seq; mc_have = 1;
    end
    mc_req_put <= mc_have;
  end
  always @(posedge mc_clk_get) if (rst_n) begin
    if (mc_req_get && mc_empty) mc_empty_stall++;
    if (mc_req_get && !mc_empty) begin
      if (mc_valid_get) begin
        if (mc_q.size() == 0) check("mc read with no item", 1, 0);
        else begin check("mc data", mc_data_get, mc_q[0]); void'(mc_q.pop_front()); end
        mc_items++;
      end else mc_dummy_out++;
    end else check("mc no valid without a read", mc_valid_get, 0);
    mc_req_get <= ($urandom % 100) < prob_get;
  end

  // ---------------- relay-station link ----------------
  logic [W-1:0] rs_q[$];
  logic [W-1:0] rs_seq = 0;
  int rs_items = 0, rs_void_out = 0, rs_src_stop = 0, rs_fifo_full = 0, rs_get_stall = 0;
  always @(posedge rs_clk_put) if (rst_n) begin
    if (u_top.u_rs_fifo.stop_out) rs_fifo_full++;
    if (rs_in_stop) rs_src_stop++;
    else begin
      if (rs_in_valid) rs_q.push_back(rs_in_data);
      if (($urandom % 100) < prob_valid) begin
        rs_seq++; rs_in_data <= rs_seq; rs_in_valid <= 1'b1;
      end else rs_in_valid <= 1'b0;
    end
  end
  always @(posedge rs_clk_get) if (rst_n) begin
    if (u_top.rp_stop[0]) rs_get_stall++;   // get-side relay station parked a packet
    if (!rs_out_stop) begin
      if (rs_out_valid) begin
        if (rs_q.size() == 0) check("rs packet with nothing sent", 1, 0);
        else begin check("rs data", rs_out_data, rs_q[0]); void'(rs_q.pop_front()); end
        rs_items++;
      end else rs_void_out++;
    end
    rs_out_stop <= ($urandom % 100) < prob_stop;
  end

  task automatic happened(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    #31 rst_n = 1;
    repeat (600) @(posedge sc_clk);
    // receiver sides faster, light sender load
    hp_mp = 7.3; hp_mg = 5.0; prob_put = 40; prob_get = 90; prob_stop = 10; prob_valid = 40;
    repeat (600) @(posedge sc_clk);
    // sender sides busy, receivers slow or stopped a lot
    hp_mp = 5.0; hp_mg = 8.2; prob_put = 95; prob_get = 40; prob_stop = 70; prob_valid = 95;
    repeat (600) @(posedge sc_clk);
    // drain
    prob_put = 0; prob_get = 100; prob_stop = 0; prob_valid = 0;
    repeat (100) @(posedge sc_clk);
    check("sc items left", sc_q.size(), 0);
    check("mc items left", mc_q.size(), 0);
    check("rs items left", rs_q.size(), 0);
    happened("single-clock full stall", sc_full_stall);
    happened("single-clock empty stall", sc_empty_stall);
    happened("mixed-clock full stall", mc_full_stall);
    happened("mixed-clock empty stall", mc_empty_stall);
    happened("mixed-clock dummy injection", mc_dummy_in);
    happened("mixed-clock dummy read", mc_dummy_out);
    happened("relay-station FIFO full (stop_out)", rs_fifo_full);
    happened("put-side relay station stall", rs_src_stop);
    happened("get-side relay station stall", rs_get_stall);
    happened("void packets delivered", rs_void_out);
    $display("sc: items=%0d full=%0d empty=%0d", sc_items, sc_full_stall, sc_empty_stall);
    $display("mc: items=%0d full=%0d empty=%0d dummy in=%0d dummy out=%0d",
             mc_items, mc_full_stall, mc_empty_stall, mc_dummy_in, mc_dummy_out);
    $display("rs: items=%0d void out=%0d fifo full=%0d src stop=%0d get-side stall=%0d",
             rs_items, rs_void_out, rs_fifo_full, rs_src_stop, rs_get_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
