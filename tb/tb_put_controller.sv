// tb_put_controller: exhaustive check of the put controller of all three
// FIFO variants against the enable conditions stated for each variant:
// single clock - a valid item is offered and the FIFO is not full;
// mixed clock  - not full, and a valid item or a dummy request;
// relay station - not full.
module tb_put_controller;
  import lowlat_fifo_pkg::*;

  logic full, req_put, empty_2;
  logic en_sc, en_mc, en_rs;
  int   checks = 0, failures = 0;

  put_controller #(.VARIANT(SINGLE_CLOCK))  u_sc (.full, .req_put, .empty_2, .en_put(en_sc));
  put_controller #(.VARIANT(MIXED_CLOCK))   u_mc (.full, .req_put, .empty_2, .en_put(en_mc));
  put_controller #(.VARIANT(RELAY_STATION)) u_rs (.full, .req_put, .empty_2, .en_put(en_rs));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s full=%b req=%b e2=%b got=%b exp=%b", what, full, req_put, empty_2, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 8; n++) begin
      {full, req_put, empty_2} = 3'(n);
      #1;
      // Expected values written as case tables, not as the gate equations.
      check("single", en_sc, (full == 1'b0 && req_put == 1'b1));
      check("mixed",  en_mc, (full == 1'b0 && (req_put == 1'b1 || empty_2 == 1'b1)));
      check("relay",  en_rs, (full == 1'b0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
