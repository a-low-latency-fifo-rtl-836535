// tb_deadlock_detector: drives full and validity patterns into the deadlock
// detector and checks that empty_2 rises, two clock edges later, exactly
// when fewer than two consecutive cells are full and some full cell holds a
// valid item (validity bits of empty cells must be ignored).
module tb_deadlock_detector;
  localparam int N = 8;

  logic         clk = 0, rst_n = 0;
  logic [N-1:0] f, v;
  logic         empty_2;
  int           checks = 0, failures = 0, raised = 0;
  bit           hist[$];

  deadlock_detector #(.NCELLS(N), .RUN(2), .SYNC_STAGES(2)) u_dut (.clk, .rst_n, .f, .v, .empty_2);

  always #5 clk = ~clk;

  // Reference: count full cells (the full cells of a FIFO are contiguous,
  // but random patterns are not, so test the pair condition directly).
  function automatic bit expect_dl(logic [N-1:0] ff, logic [N-1:0] vv);
    bit pair = 0, valid = 0;
    for (int i = 0; i < N; i++) begin
      if (ff[i] && ff[(i + 1) % N]) pair = 1;
      if (ff[i] && vv[i]) valid = 1;
    end
    return !pair && valid;
  endfunction

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s t=%0t f=%b v=%b got=%b exp=%b", what, $time, f, v, got, exp);
    end
  endtask

  initial begin
    f = '0; v = '1;
    repeat (2) @(posedge clk);
    check("reset", empty_2, 1'b0);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      v = N'($urandom);
      case (t % 4)
        0: f = N'(1) << ($urandom % N);          // one item
        1: f = '0;                              // nothing
        2: f = N'(3) << ($urandom % (N - 1));   // two items
        default: f = N'($urandom);
      endcase
      @(posedge clk);
      hist.push_back(expect_dl(f, v));
      #1;
      if (hist.size() >= 2) begin
        check("empty_2", empty_2, hist[hist.size() - 2]);
        if (empty_2) raised++;
      end
    end
    checks++;
    if (raised == 0) begin
      failures++;
      $display("FAIL empty_2 never raised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
