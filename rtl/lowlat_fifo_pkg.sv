// lowlat_fifo_pkg: types shared by the token-ring FIFO family.
//
// The three FIFOs (single-clock, mixed-clock and relay-station) are built
// from the same cell ring, the same detectors and two small controllers.
// The controllers differ only in their gate equations, selected here by
// fifo_variant_e. Packets on a relay-station link are a data item plus a
// validity bit; pkt_valid() and pkt_data() take a packet vector apart.
package lowlat_fifo_pkg;

  // Which member of the family a controller belongs to.
  typedef enum logic [1:0] {
    SINGLE_CLOCK  = 2'd0,  // one clock, put/get on request
    MIXED_CLOCK   = 2'd1,  // two clocks, synchronized full/empty, dummy items
    RELAY_STATION = 2'd2   // two clocks, continuous flow stopped by stop signals
  } fifo_variant_e;

  // Default sizes of the evaluated configuration: 8 cells of 8 bits.
  localparam int unsigned DEFAULT_NCELLS = 8;
  localparam int unsigned DEFAULT_DATA_W = 8;

endpackage
