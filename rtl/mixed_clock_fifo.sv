// mixed_clock_fifo: token-ring FIFO between two unrelated clock domains.
//
// The same cell ring as the single-clock FIFO, with the put token, the data
// registers, the full detector and the deadlock detector on clk_put, and the
// get token and the empty detector on clk_get. Only the two global status
// signals cross domains, never the data: full is resynchronized to clk_put
// and empty to clk_get through FULL_SYNC / EMPTY_SYNC flip-flops. To make up
// for that delay, full means "fewer than FULL_SYNC+FULL_MARGIN empty cells"
// and empty means "fewer than EMPTY_SYNC+EMPTY_MARGIN full cells". With the
// default of two flip-flops the FIFO therefore behaves as an (NCELLS-1)-place
// queue at times. Set EMPTY_MARGIN = 1 when the receiver clock is more than
// about three times faster than the sender clock; the deadlock detector then
// follows the same definition.
//
// Because a receiver can be stopped while one valid item is still inside,
// the deadlock detector raises empty_2 (after two clk_put flip-flops) and the
// put controller enqueues an invalid "dummy" item even without req_put; the
// receiver reads dummy items with valid_get = 0.
//
// Put interface (clk_put): req_put and data_put after an edge, taken at the
// next edge if full is low; the sender holds its item while full is high.
// Get interface (clk_get): req_get after an edge; if empty is low an item is
// driven on data_get within the cycle, with valid_get telling real data from
// a dummy. Reset is asynchronous, active low, and must reach both domains.
module mixed_clock_fifo
  import lowlat_fifo_pkg::*;
#(
  parameter int unsigned NCELLS       = DEFAULT_NCELLS,
  parameter int unsigned DATA_W       = DEFAULT_DATA_W,
  parameter int unsigned FULL_SYNC    = 2,
  parameter int unsigned EMPTY_SYNC   = 2,
  parameter int unsigned FULL_MARGIN  = 0,
  parameter int unsigned EMPTY_MARGIN = 0
) (
  input  logic              clk_put,
  input  logic              clk_get,
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

  localparam int unsigned FULL_RUN  = FULL_SYNC + FULL_MARGIN;
  localparam int unsigned EMPTY_RUN = EMPTY_SYNC + EMPTY_MARGIN;

  logic              en_put, en_get, valid_i, empty_2;
  logic [NCELLS-1:0] f, e, v;

  put_controller #(.VARIANT(MIXED_CLOCK)) u_put_ctl (
    .full   (full),
    .req_put(req_put),
    .empty_2(empty_2),
    .en_put (en_put)
  );

  get_controller #(.VARIANT(MIXED_CLOCK)) u_get_ctl (
    .empty    (empty),
    .req_get  (req_get),
    .stop_in  (1'b0),
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
    .v       (v)
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

  deadlock_detector #(.NCELLS(NCELLS), .RUN(EMPTY_RUN), .SYNC_STAGES(2)) u_dl_det (
    .clk    (clk_put),
    .rst_n  (rst_n),
    .f      (f),
    .v      (v),
    .empty_2(empty_2)
  );

endmodule
