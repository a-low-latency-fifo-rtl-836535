// fifo_cell: one place of the token-ring FIFO.
//
// The cell stores one data item and its validity bit, and takes part in
// passing two tokens around the ring: the put token marks the tail (where
// the next item is written) and the get token marks the head (where the next
// item is read). The cell owns the token while ptok_in / gtok_in is high;
// those inputs are the token flip-flops of the neighbour before it in the
// ring. Its own flip-flops (ptok_out, gtok_out) copy ptok_in / gtok_in on
// every clock edge on which the global enable (en_put / en_get) is high, so
// an enabled operation moves the token one place along the ring.
//
// Put (CLK_put domain): when ptok_in & en_put, the register REG captures
// data_put and req_put (the validity bit v_i) at the next CLK_put edge, and
// the full/empty state is set to "full" at once, during the cycle.
// Get (CLK_get domain): when gtok_in & en_get, the cell drives its data and
// validity bit onto the shared read bus during the cycle and sets its state
// to "empty" at once.
//
// The full/empty state behaves like the SR latch of the original circuit
// (set by a put, reset by a get, visible during the cycle of the operation),
// but is built from clocked flip-flops: a put-side flag (clk_put) and a
// get-side flag (clk_get). The cell holds an item when the flags differ. A
// put makes them differ (pflag <= ~gflag) and a get makes them equal
// (gflag <= pflag), so, like the latch, a repeated set or reset changes
// nothing. Each side only reads the other side's flag when the ring gives it
// the cell, long after that flag last changed. During a put cycle f_i is already
// high, and during a get cycle it is already low, which is the early
// indication the detectors rely on; those only sample f_i / e_i on clock
// edges. A real latch set from the AND of ptok_in and en_put would also be
// set by the short overlap right after a clock edge, when the token has moved
// but en_put has not yet changed; the flag pair ignores such transients.
//
// The shared tristate buses of the original are replaced by an OR bus: a
// cell that is not reading drives zeros on data_get and valid_i, and the
// ring ORs all cells together. REG is never cleared after a read, so v_i can
// be stale in an empty cell; users must qualify it with f_i.
//
// Reset (asynchronous, active low) is this design's own choice: the cell is
// empty, and only the cell with INIT_PTOK / INIT_GTOK set holds a token bit.
module fifo_cell #(
  parameter int unsigned DATA_W    = 8,
  parameter bit          INIT_PTOK = 1'b0,  // reset value of ptok_out
  parameter bit          INIT_GTOK = 1'b0   // reset value of gtok_out
) (
  input  logic              clk_put,
  input  logic              clk_get,
  input  logic              rst_n,
  // put side
  input  logic              en_put,
  input  logic              req_put,     // validity bit stored with the item
  input  logic [DATA_W-1:0] data_put,
  input  logic              ptok_in,
  output logic              ptok_out,
  // get side
  input  logic              en_get,
  input  logic              gtok_in,
  output logic              gtok_out,
  output logic [DATA_W-1:0] data_get,    // zero unless this cell is read
  output logic              valid_i,     // zero unless this cell is read
  // state, to the detectors
  output logic              f_i,         // cell holds an item
  output logic              e_i,         // cell is empty
  output logic              v_i          // stored validity bit (may be stale)
);

  logic              put_now, get_now;
  logic [DATA_W-1:0] data_q;
  logic              valid_q;
  logic              pflag_q, gflag_q, stored;

  assign put_now = ptok_in & en_put;
  assign get_now = gtok_in & en_get;

  // Put-token flip-flop, enabled by en_put.
  always_ff @(posedge clk_put or negedge rst_n)
    if (!rst_n)      ptok_out <= INIT_PTOK;
    else if (en_put) ptok_out <= ptok_in;

  // Get-token flip-flop, enabled by en_get.
  always_ff @(posedge clk_get or negedge rst_n)
    if (!rst_n)      gtok_out <= INIT_GTOK;
    else if (en_get) gtok_out <= gtok_in;

  // REG: data item and validity bit, written at the end of a put cycle.
  always_ff @(posedge clk_put or negedge rst_n)
    if (!rst_n) begin
      data_q  <= '0;
      valid_q <= 1'b0;
    end else if (put_now) begin
      data_q  <= data_put;
      valid_q <= req_put;
    end

  // Full/empty state: one set/clear flag per clock domain.
  always_ff @(posedge clk_put or negedge rst_n)
    if (!rst_n)       pflag_q <= 1'b0;
    else if (put_now) pflag_q <= ~gflag_q;

  always_ff @(posedge clk_get or negedge rst_n)
    if (!rst_n)       gflag_q <= 1'b0;
    else if (get_now) gflag_q <= pflag_q;

  assign stored = pflag_q ^ gflag_q;
  assign f_i    = put_now | (stored & ~get_now);
  assign e_i    = ~f_i;
  assign v_i = valid_q;

  // Ring rules, which the full and empty logic must guarantee: a put only
  // targets an empty cell, and a get only a cell whose write has completed.
  // A violation means overflow or a stale read (e.g. clocks whose ratio
  // exceeds what the full/empty margins were chosen for).
  a_put_into_empty: assert property (@(posedge clk_put) disable iff (!rst_n) put_now |-> !stored)
    else $error("fifo_cell: put into a cell that still holds an item");
  a_get_written: assert property (@(posedge clk_get) disable iff (!rst_n) get_now |-> stored)
    else $error("fifo_cell: get from a cell whose write has not completed");

  // Read-bus drivers.
  assign data_get = get_now ? data_q : '0;
  assign valid_i  = get_now & valid_q;

endmodule
