// relay_station: one pipeline stage of a long single-clock link.
//
// A long wire between two blocks is cut into one-cycle segments with a relay
// station in each. A packet is a data item plus a valid bit. Flow control
// uses stop signals that are themselves registered: a packet offered on
// packet_in is taken at a clock edge if stop_out was low during that cycle,
// and packet_out is taken by the next stage if stop_in was low.
//
// Normally every edge copies packet_in into the main register MR, which
// drives packet_out. When stop_in is high, MR keeps its (untaken) packet; at
// that edge the packet arriving on packet_in, which the left stage already
// sent, is parked in the auxiliary register AR and stop_out rises. When
// stop_in falls again, MR is sent first; on that edge AR moves into MR (to
// be sent next) and stop_out falls, so the left stage resumes one cycle
// later and nothing is lost or duplicated.
//
// The register-transfer structure (MR, AR, input switch, registered stop)
// follows the usual relay station; moving AR into MR, rather than muxing AR
// straight to the output, is this design's choice. Every packet, valid or
// void, is stored. Reset (asynchronous, active low) empties both registers
// into void packets and clears stop_out.
module relay_station #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] in_data,
  output logic              stop_out,
  output logic              out_valid,
  output logic [DATA_W-1:0] out_data,
  input  logic              stop_in
);

  logic              mr_valid, ar_valid;
  logic [DATA_W-1:0] mr_data,  ar_data;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      mr_valid <= 1'b0;
      mr_data  <= '0;
      ar_valid <= 1'b0;
      ar_data  <= '0;
      stop_out <= 1'b0;
    end else if (!stop_out) begin
      // Accepting: packet_in is taken at this edge.
      if (!stop_in) begin
        mr_valid <= in_valid;
        mr_data  <= in_data;
      end else begin
        ar_valid <= in_valid;
        ar_data  <= in_data;
        stop_out <= 1'b1;
      end
    end else if (!stop_in) begin
      // Stalled, and MR is taken at this edge: AR's packet goes next.
      mr_valid <= ar_valid;
      mr_data  <= ar_data;
      stop_out <= 1'b0;
    end

  assign out_valid = mr_valid;
  assign out_data  = mr_data;

endmodule
