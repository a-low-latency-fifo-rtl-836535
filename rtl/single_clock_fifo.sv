// single_clock_fifo: low-latency token-ring FIFO with one clock.
//
// NCELLS cells form a ring; a put token marks the tail and a get token the
// head. Items are written once into the tail cell and read from there, never
// shifted, so an item written in cycle k can be read in cycle k+1.
//
// Put interface: the sender drives data_put and req_put after a clock edge;
// the item is taken at the next edge if full was low in that cycle. full
// rises on the edge after the put that filled the last empty cell; while it
// is high the sender must hold its item.
// Get interface: the receiver raises req_get after an edge; if empty is low
// the head item appears on data_get with valid_get = 1 within the cycle and
// is taken on the next edge. empty rises on the edge after the last item
// has been read. Both status outputs are registered.
//
// The full and empty detectors work on the exact definitions (no empty cell
// / no full cell) with one flip-flop each; the controllers are the two AND
// gates of the single-clock variant. Reset is asynchronous, active low.
module single_clock_fifo
  import lowlat_fifo_pkg::*;
#(
  parameter int unsigned NCELLS = DEFAULT_NCELLS,
  parameter int unsigned DATA_W = DEFAULT_DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // put interface
  input  logic              req_put,
  input  logic [DATA_W-1:0] data_put,
  output logic              full,
  // get interface
  input  logic              req_get,
  output logic [DATA_W-1:0] data_get,
  output logic              valid_get,
  output logic              empty
);

  logic              en_put, en_get, valid_i;
  logic [NCELLS-1:0] f, e;

  put_controller #(.VARIANT(SINGLE_CLOCK)) u_put_ctl (
    .full   (full),
    .req_put(req_put),
    .empty_2(1'b0),
    .en_put (en_put)
  );

  get_controller #(.VARIANT(SINGLE_CLOCK)) u_get_ctl (
    .empty    (empty),
    .req_get  (req_get),
    .stop_in  (1'b0),
    .valid_i  (valid_i),
    .en_get   (en_get),
    .valid_get(valid_get)
  );

  fifo_cell_ring #(.NCELLS(NCELLS), .DATA_W(DATA_W)) u_ring (
    .clk_put (clk),
    .clk_get (clk),
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

  full_detector #(.NCELLS(NCELLS), .RUN(1), .SYNC_STAGES(1)) u_full_det (
    .clk  (clk),
    .rst_n(rst_n),
    .e    (e),
    .full (full)
  );

  empty_detector #(.NCELLS(NCELLS), .RUN(1), .SYNC_STAGES(1)) u_empty_det (
    .clk  (clk),
    .rst_n(rst_n),
    .f    (f),
    .empty(empty)
  );

endmodule
