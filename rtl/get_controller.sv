// get_controller: the global get enable and the valid_get output.
//
// en_get moves the get token and makes the head cell drive the read bus.
//   SINGLE_CLOCK:  en_get = ~empty & req_get;  valid_get = en_get
//                  (only valid items are ever stored)
//   MIXED_CLOCK:   en_get = ~empty & req_get;  valid_get = en_get & valid_i
//                  (dummy items are read but reported invalid)
//   RELAY_STATION: en_get = ~empty & ~stop_in; valid_get = en_get & valid_i
//                  (an item is read on every cycle unless the FIFO is empty
//                  or the next relay station stops the flow)
// valid_i is the validity bit of the cell being read. Purely combinational.
// The three equations are those of the original controllers; sharing one
// module selected by VARIANT is this design's choice.
module get_controller
  import lowlat_fifo_pkg::*;
#(
  parameter fifo_variant_e VARIANT = MIXED_CLOCK
) (
  input  logic empty,
  input  logic req_get,
  input  logic stop_in,
  input  logic valid_i,
  output logic en_get,
  output logic valid_get
);

  always_comb begin
    unique case (VARIANT)
      SINGLE_CLOCK: begin
        en_get    = ~empty & req_get;
        valid_get = en_get;
      end
      MIXED_CLOCK: begin
        en_get    = ~empty & req_get;
        valid_get = en_get & valid_i;
      end
      RELAY_STATION: begin
        en_get    = ~empty & ~stop_in;
        valid_get = en_get & valid_i;
      end
      default: begin
        en_get    = 1'b0;
        valid_get = 1'b0;
      end
    endcase
  end

endmodule
