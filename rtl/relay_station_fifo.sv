// relay_station_fifo: mixed-clock FIFO used as a relay station.
//
// It sits between a chain of relay stations clocked by clk_put and a chain
// clocked by clk_get. There are no requests: a packet (data_put with its
// valid bit req_put) is enqueued on every clk_put cycle unless the FIFO is
// full, and a packet is dequeued on every clk_get cycle unless the FIFO is
// empty or the next station asserts stop_in. Void (invalid) packets flow
// through like valid ones, so the FIFO never deadlocks and needs no deadlock
// detector. stop_out is the full signal, which stops the left chain.
//
// Put side (clk_put): packet_in = {req_put, data_put} is taken at each edge
// at which stop_out was low during the cycle.
// Get side (clk_get): packet_out = {valid_get, data_get} is valid data only
// when valid_get is high; when the FIFO is empty or stopped it carries a
// void packet (valid_get = 0, data_get = 0). A packet is handed on at each
// edge at which stop_in was low during the cycle.
// Full and empty use the mixed-clock definitions and two-flip-flop
// synchronizers. As in mixed_clock_fifo, FULL_MARGIN / EMPTY_MARGIN move the
// full or empty definition one place further, for a sender or receiver
// clock that is much faster than the other (more than about three times):
// full means fewer than FULL_SYNC+FULL_MARGIN empty cells, empty fewer than
// EMPTY_SYNC+EMPTY_MARGIN full cells. Carrying these options over from the
// mixed-clock FIFO is this design's choice. Reset is asynchronous, active
// low.
module relay_station_fifo
  import lowlat_fifo_pkg::*;
#(
  parameter int unsigned NCELLS     = DEFAULT_NCELLS,
  parameter int unsigned DATA_W     = DEFAULT_DATA_W,
  parameter int unsigned FULL_SYNC    = 2,
  parameter int unsigned EMPTY_SYNC   = 2,
  parameter int unsigned FULL_MARGIN  = 0,
  parameter int unsigned EMPTY_MARGIN = 0
) (
  input  logic              clk_put,
  input  logic              clk_get,
  input  logic              rst_n,
  // left (put) side
  input  logic              req_put,    // valid bit of packet_in
  input  logic [DATA_W-1:0] data_put,
  output logic              stop_out,
  // right (get) side
  output logic              valid_get,  // valid bit of packet_out
  output logic [DATA_W-1:0] data_get,
  input  logic              stop_in
);

  localparam int unsigned FULL_RUN  = FULL_SYNC + FULL_MARGIN;
  localparam int unsigned EMPTY_RUN = EMPTY_SYNC + EMPTY_MARGIN;

  logic              full, empty, en_put, en_get, valid_i;
  logic [NCELLS-1:0] f, e;

  put_controller #(.VARIANT(RELAY_STATION)) u_put_ctl (
    .full   (full),
    .req_put(req_put),
    .empty_2(1'b0),
    .en_put (en_put)
  );

  get_controller #(.VARIANT(RELAY_STATION)) u_get_ctl (
    .empty    (empty),
    .req_get  (1'b0),
    .stop_in  (stop_in),
    .valid_i  (valid_i),
    .en_get   (en_get),
    .valid_get(valid_get)
  );

  fifo_cell_ring #(.NCELLS(NCELLS), .DATA_W(DATA_W)) u_ring (
    .clk_put (clk_put),
    .clk_get (clk_get),
    .rst_n   (rst_n),
    .en_put  (en_put),
    .req_put (req_put),
    .data_put(data_put),
    .en_get  (en_get),
    .data_get(data_get),
    .valid_i (valid_i),
    .f       (f),
    .e       (e),
    .v       ()
  );

  full_detector #(.NCELLS(NCELLS), .RUN(FULL_RUN), .SYNC_STAGES(FULL_SYNC)) u_full_det (
    .clk  (clk_put),
    .rst_n(rst_n),
    .e    (e),
    .full (full)
  );

  empty_detector #(.NCELLS(NCELLS), .RUN(EMPTY_RUN), .SYNC_STAGES(EMPTY_SYNC)) u_empty_det (
    .clk  (clk_get),
    .rst_n(rst_n),
    .f    (f),
    .empty(empty)
  );

  assign stop_out = full;

endmodule
