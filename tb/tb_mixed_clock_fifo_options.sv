// tb_mixed_clock_fifo_options: the robustness options of the mixed-clock
// FIFO, each in its own instance with its own clocks and scoreboard.
//  a) default FIFO, receiver clock about 1.3x the sender's (reference);
//  b) EMPTY_MARGIN = 1 ("empty" below three items) with a receiver clock
//     about 4.4x faster than the sender's;
//  c) one more synchronizer flip-flop on both sides (FULL_SYNC =
//     EMPTY_SYNC = 3), which also moves full and empty by one place;
//  d) FULL_MARGIN = 1 ("full" below three empty cells) with a sender
//     clock about 4.4x faster than the receiver's.
// Every valid item must arrive once and in order, all must drain, and each
// instance must have seen both full and empty stalls.
module tb_mixed_clock_fifo_options;
  int  c[4], f[4], it[4], fs[4], es[4];
  bit  d[4];
  int  checks, failures;

  mixed_fifo_traffic #(.HP_PUT(5.0),  .HP_GET(3.85))                 u_a (c[0], f[0], it[0], fs[0], es[0], d[0]);
  mixed_fifo_traffic #(.HP_PUT(11.0), .HP_GET(2.5), .EMPTY_MARGIN(1),
                       .PUT_PCT(100), .GET_PCT(15), .CYCLES(1000))  u_b (c[1], f[1], it[1], fs[1], es[1], d[1]);
  mixed_fifo_traffic #(.FULL_SYNC(3), .EMPTY_SYNC(3))                 u_c (c[2], f[2], it[2], fs[2], es[2], d[2]);
  mixed_fifo_traffic #(.HP_PUT(2.5),  .HP_GET(11.0), .FULL_MARGIN(1), .PUT_PCT(60),
                       .GET_PCT(90), .CYCLES(4000))                  u_d (c[3], f[3], it[3], fs[3], es[3], d[3]);

  initial begin
    wait (d[0] && d[1] && d[2] && d[3]);
    checks = 0; failures = 0;
    for (int k = 0; k < 4; k++) begin
      checks += c[k] + 1;
      failures += f[k];
      if (it[k] < 100 || fs[k] == 0 || es[k] == 0) begin
        failures++;
        $display("FAIL config %0d coverage: items=%0d full=%0d empty=%0d", k, it[k], fs[k], es[k]);
      end
      $display("config %0d: items=%0d full stalls=%0d empty stalls=%0d", k, it[k], fs[k], es[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
