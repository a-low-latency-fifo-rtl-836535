// put_controller: the global put enable of the token ring.
//
// en_put moves the put token and writes the tail cell. Its equation depends
// on the member of the FIFO family:
//   SINGLE_CLOCK:  en_put = ~full & req_put
//   MIXED_CLOCK:   en_put = ~full & (req_put | empty_2)   (empty_2 injects a
//                  dummy item for deadlock prevention)
//   RELAY_STATION: en_put = ~full                         (items, valid or
//                  not, are always enqueued; req_put is only the valid bit)
// Purely combinational. The three equations are those of the original
// controllers; sharing one module selected by VARIANT is this design's choice.
module put_controller
  import lowlat_fifo_pkg::*;
#(
  parameter fifo_variant_e VARIANT = MIXED_CLOCK
) (
  input  logic full,
  input  logic req_put,
  input  logic empty_2,
  output logic en_put
);

  always_comb
    unique case (VARIANT)
      SINGLE_CLOCK:  en_put = ~full & req_put;
      MIXED_CLOCK:   en_put = ~full & (req_put | empty_2);
      RELAY_STATION: en_put = ~full;
      default:       en_put = 1'b0;
    endcase

endmodule
