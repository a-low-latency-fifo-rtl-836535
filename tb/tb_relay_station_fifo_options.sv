// tb_relay_station_fifo_options: the relay-station FIFO at large clock
// ratios, each configuration in its own instance with its own clocks and
// scoreboard.
//  a) default FIFO, receiver clock about 1.3x the sender's (reference);
//  b) EMPTY_MARGIN = 1 ("empty" below three packets) with a receiver clock
//     about 4.4x faster than the sender's;
//  c) FULL_MARGIN = 1 ("full" below three empty cells) with a sender clock
//     about 4.4x faster than the receiver's.
// Every valid packet must arrive once and in order, all must drain, and each
// instance must have stopped its source (stop_out) and sent void packets.
module tb_relay_station_fifo_options;
  int  c[3], f[3], it[3], so[3], vo[3];
  bit  d[3];
  int  checks, failures;

  relay_fifo_traffic #(.HP_PUT(5.0),  .HP_GET(3.85))                    u_a (c[0], f[0], it[0], so[0], vo[0], d[0]);
  relay_fifo_traffic #(.HP_PUT(11.0), .HP_GET(2.5), .EMPTY_MARGIN(1),
                       .VALID_PCT(90), .STOP_PCT(80), .CYCLES(1000))   u_b (c[1], f[1], it[1], so[1], vo[1], d[1]);
  relay_fifo_traffic #(.HP_PUT(2.5),  .HP_GET(11.0), .FULL_MARGIN(1),
                       .VALID_PCT(60), .STOP_PCT(10), .CYCLES(4000))   u_c (c[2], f[2], it[2], so[2], vo[2], d[2]);

  initial begin
    wait (d[0] && d[1] && d[2]);
    checks = 0; failures = 0;
    for (int k = 0; k < 3; k++) begin
      checks += c[k] + 1;
      failures += f[k];
      if (it[k] < 100 || so[k] == 0 || vo[k] == 0) begin
        failures++;
        $display("FAIL config %0d coverage: items=%0d stop_out=%0d void out=%0d", k, it[k], so[k], vo[k]);
      end
      $display("config %0d: valid packets=%0d stop_out cycles=%0d void out=%0d", k, it[k], so[k], vo[k]);
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
