// tb_full_detector: drives random and hand-picked empty-cell patterns into
// the full detector in its mixed-clock setting (8 cells, pairs, two
// flip-flops) and its single-clock setting (any empty cell, one flip-flop),
// and compares 'full' with a reference that counts the longest cyclic run
// of empty cells and delays the verdict by the number of flip-flops.
module tb_full_detector;
  localparam int N = 8;

  logic         clk = 0, rst_n = 0;
  logic [N-1:0] e;
  logic         full2, full1;
  int           checks = 0, failures = 0;
  bit           hist2[$], hist1[$];

  full_detector #(.NCELLS(N), .RUN(2), .SYNC_STAGES(2)) u_dut2 (.clk, .rst_n, .e, .full(full2));
  full_detector #(.NCELLS(N), .RUN(1), .SYNC_STAGES(1)) u_dut1 (.clk, .rst_n, .e, .full(full1));

  always #5 clk = ~clk;

  // Longest cyclic run of ones in x.
  function automatic int longest_run(logic [N-1:0] x);
    int best = 0;
    for (int s = 0; s < N; s++) begin
      int len = 0;
      while (len < N && x[(s + len) % N]) len++;
      if (len > best) best = len;
    end
    return best;
  endfunction

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s t=%0t e=%b got=%b exp=%b", what, $time, e, got, exp);
    end
  endtask

  initial begin
    e = '1;
    repeat (2) @(posedge clk);
    check("reset2", full2, 1'b0);
    check("reset1", full1, 1'b0);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      case (t % 5)
        0: e = N'($urandom);
        1: e = N'(1) << ($urandom % N);                        // one empty cell
        2: e = (N'(3) << ($urandom % (N - 1)));                // two adjacent
        3: e = N'(1) | (N'(1) << (N - 1));                      // adjacent across the wrap
        default: e = '0;                                       // no empty cell
      endcase
      @(posedge clk);
      hist2.push_back(longest_run(e) < 2);
      hist1.push_back(longest_run(e) < 1);
      #1;
      // one flip-flop: the verdict on this edge's pattern
      check("single", full1, hist1[$]);
      // two flip-flops: the verdict on the previous edge's pattern
      if (hist2.size() >= 2) check("mixed", full2, hist2[hist2.size() - 2]);
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
