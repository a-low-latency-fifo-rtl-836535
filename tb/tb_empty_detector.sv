// tb_empty_detector: drives random and hand-picked full-cell patterns into
// the empty detector in its mixed-clock setting (pairs, two flip-flops), its
// single-clock setting (any full cell, one flip-flop) and its fast-receiver
// setting (three in a row), and compares 'empty' with a reference that
// counts the longest cyclic run of full cells, delayed by the flip-flops.
module tb_empty_detector;
  localparam int N = 8;

  logic         clk = 0, rst_n = 0;
  logic [N-1:0] f;
  logic         empty2, empty1, empty3;
  int           checks = 0, failures = 0;
  bit           hist2[$], hist3[$];

  empty_detector #(.NCELLS(N), .RUN(2), .SYNC_STAGES(2)) u_dut2 (.clk, .rst_n, .f, .empty(empty2));
  empty_detector #(.NCELLS(N), .RUN(1), .SYNC_STAGES(1)) u_dut1 (.clk, .rst_n, .f, .empty(empty1));
  empty_detector #(.NCELLS(N), .RUN(3), .SYNC_STAGES(2)) u_dut3 (.clk, .rst_n, .f, .empty(empty3));

  always #5 clk = ~clk;

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
      $display("FAIL %s t=%0t f=%b got=%b exp=%b", what, $time, f, got, exp);
    end
  endtask

  initial begin
    f = '1;
    repeat (2) @(posedge clk);
    check("reset2", empty2, 1'b1);
    check("reset1", empty1, 1'b1);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      case (t % 6)
        0: f = N'($urandom);
        1: f = N'(1) << ($urandom % N);
        2: f = N'(3) << ($urandom % (N - 1));
        3: f = N'(1) | (N'(1) << (N - 1));
        4: f = N'(7) << ($urandom % (N - 2));
        default: f = '0;
      endcase
      @(posedge clk);
      hist2.push_back(longest_run(f) < 2);
      hist3.push_back(longest_run(f) < 3);
      #1;
      check("single", empty1, longest_run(f) < 1);
      if (hist2.size() >= 2) begin
        check("mixed", empty2, hist2[hist2.size() - 2]);
        check("fast",  empty3, hist3[hist3.size() - 2]);
      end
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
