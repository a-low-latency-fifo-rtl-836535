// tb_get_controller: exhaustive check of the get controller of all three
// FIFO variants: a get happens when the FIFO is not empty and the receiver
// asks (request, or no stop for the relay-station variant); valid_get tells
// whether the item read is real data.
module tb_get_controller;
  import lowlat_fifo_pkg::*;

  logic empty, req_get, stop_in, valid_i;
  logic en_sc, en_mc, en_rs, vg_sc, vg_mc, vg_rs;
  int   checks = 0, failures = 0;

  get_controller #(.VARIANT(SINGLE_CLOCK))  u_sc (.empty, .req_get, .stop_in, .valid_i, .en_get(en_sc), .valid_get(vg_sc));
  get_controller #(.VARIANT(MIXED_CLOCK))   u_mc (.empty, .req_get, .stop_in, .valid_i, .en_get(en_mc), .valid_get(vg_mc));
  get_controller #(.VARIANT(RELAY_STATION)) u_rs (.empty, .req_get, .stop_in, .valid_i, .en_get(en_rs), .valid_get(vg_rs));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s empty=%b req=%b stop=%b vi=%b got=%b exp=%b",
               what, empty, req_get, stop_in, valid_i, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 16; n++) begin
      bit get_sc, get_rs;
      {empty, req_get, stop_in, valid_i} = 4'(n);
      #1;
      get_sc = (empty == 1'b0) && (req_get == 1'b1);
      get_rs = (empty == 1'b0) && (stop_in == 1'b0);
      check("sc en",    en_sc, get_sc);
      check("sc valid", vg_sc, get_sc);
      check("mc en",    en_mc, get_sc);
      check("mc valid", vg_mc, get_sc && valid_i == 1'b1);
      check("rs en",    en_rs, get_rs);
      check("rs valid", vg_rs, get_rs && valid_i == 1'b1);
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
