// tb_fifo_cell: random stimulus on one FIFO cell, checked against a cycle
// model of the cell written from its specification:
//  - with ptok_in & en_put the cell reports full within the same cycle and
//    stores data_put / req_put at the next clk_put edge;
//  - with gtok_in & en_get it drives its item and validity bit on the read
//    bus within the cycle and reports empty at once;
//  - token flip-flops copy their input at each edge where the enable is high;
//  - the validity bit is kept (stale) after a read.
// The two clocks run at different periods. Like the ring around it, the
// testbench only puts into an empty cell and only reads a written one; the
// cell's own assertions check that rule.
module tb_fifo_cell;
  localparam int W = 8;

  logic         clk_put = 0, clk_get = 0, rst_n = 0;
  logic         en_put = 0, req_put = 0, ptok_in = 0, en_get = 0, gtok_in = 0;
  logic [W-1:0] data_put = '0;
  logic         ptok_out, gtok_out, valid_i, f_i, e_i, v_i;
  logic [W-1:0] data_get;
  int           checks = 0, failures = 0, n_put = 0, n_get = 0;

  // Model state.
  bit           m_full = 0, m_valid = 0, m_ptok = 1, m_gtok = 0;
  logic [W-1:0] m_data = '0;

  fifo_cell #(.DATA_W(W), .INIT_PTOK(1'b1), .INIT_GTOK(1'b0)) u_dut (.*);

  always #5 clk_put = ~clk_put;
  always #7 clk_get = ~clk_get;

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s t=%0t got=%h exp=%h", what, $time, got, exp);
    end
  endtask

  // Put side model and stimulus.
  initial begin
    #1;
    check("reset f", f_i, 0);
    check("reset e", e_i, 1);
    check("reset ptok", ptok_out, 1);
    check("reset gtok", gtok_out, 0);
    #20 rst_n = 1;
    repeat (300) begin
      @(negedge clk_put);
      ptok_in  = 1'($urandom) & !m_full;
      en_put   = 1'($urandom);
      req_put  = 1'($urandom);
      data_put = W'($urandom);
      #1;
      if (ptok_in && en_put) check("f set at once", f_i, 1);
      @(posedge clk_put);
      if (ptok_in && en_put) begin
        m_data  = data_put;
        m_valid = req_put;
        m_full  = 1;
        n_put++;
      end
      if (en_put) m_ptok = ptok_in;
      #1;
      check("ptok_out", ptok_out, m_ptok);
      check("v_i", v_i, m_valid);
    end
    en_put = 0;
  end

  // Get side model and stimulus; the cell's state is also changed by puts,
  // so the get side samples the model at the time of its checks.
  initial begin
    #25;
    repeat (200) begin
      @(negedge clk_get);
      gtok_in = 1'($urandom) & m_full;
      en_get  = 1'($urandom) & 1'($urandom);   // reads less often than writes
      #1;
      if (gtok_in && en_get) begin
        check("data_get", data_get, m_data);
        check("valid_i", valid_i, m_valid);
        check("e set at once", e_i, !(en_put && ptok_in));
        n_get++;
      end else begin
        check("bus idle data", data_get, '0);
        check("bus idle valid", valid_i, 0);
      end
      check("f/e complementary", f_i ^ e_i, 1);
      check("f_i state", f_i, (ptok_in && en_put) || (m_full && !(gtok_in && en_get)));
      @(posedge clk_get);
      if (gtok_in && en_get) m_full = 0;
      if (en_get) m_gtok = gtok_in;
      #1;
      check("gtok_out", gtok_out, m_gtok);
    end
    en_get = 0;
    #50;
    checks++;
    if (n_put < 20 || n_get < 10) begin
      failures++;
      $display("FAIL too few operations put=%0d get=%0d", n_put, n_get);
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
