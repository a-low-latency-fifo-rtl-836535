// lowlat_fifo_top: the three members of the token-ring FIFO family, side by
// side, each with its own clocks and ports (shared asynchronous reset).
//
//   sc_*  single_clock_fifo  - one clock, request-driven put and get.
//   mc_*  mixed_clock_fifo   - sender on mc_clk_put, receiver on mc_clk_get.
//   rs_*  relay-station link  - N_RS_PUT relay stations on rs_clk_put, then a
//         relay_station_fifo crossing into rs_clk_get, then N_RS_GET relay
//         stations on rs_clk_get. rs_in_* is the packet the sending system
//         offers (taken at each rs_clk_put edge at which rs_in_stop was
//         low); rs_out_* is the packet handed to the receiving system (which
//         takes it at each rs_clk_get edge at which its rs_out_stop was low).
// Each FIFO has NCELLS places of DATA_W bits. See the individual modules for
// the timing of their interfaces.
module lowlat_fifo_top
  import lowlat_fifo_pkg::*;
#(
  parameter int unsigned NCELLS   = DEFAULT_NCELLS,
  parameter int unsigned DATA_W   = DEFAULT_DATA_W,
  parameter int unsigned N_RS_PUT = 1,
  parameter int unsigned N_RS_GET = 1
) (
  input  logic              rst_n,
  // single-clock FIFO
  input  logic              sc_clk,
  input  logic              sc_req_put,
  input  logic [DATA_W-1:0] sc_data_put,
  output logic              sc_full,
  input  logic              sc_req_get,
  output logic [DATA_W-1:0] sc_data_get,
  output logic              sc_valid_get,
  output logic              sc_empty,
  // mixed-clock FIFO
  input  logic              mc_clk_put,
  input  logic              mc_clk_get,
  input  logic              mc_req_put,
  input  logic [DATA_W-1:0] mc_data_put,
  output logic              mc_full,
  input  logic              mc_req_get,
  output logic [DATA_W-1:0] mc_data_get,
  output logic              mc_valid_get,
  output logic              mc_empty,
  // relay-station link
  input  logic              rs_clk_put,
  input  logic              rs_clk_get,
  input  logic              rs_in_valid,
  input  logic [DATA_W-1:0] rs_in_data,
  output logic              rs_in_stop,
  output logic              rs_out_valid,
  output logic [DATA_W-1:0] rs_out_data,
  input  logic              rs_out_stop
);

  single_clock_fifo #(.NCELLS(NCELLS), .DATA_W(DATA_W)) u_sc_fifo (
    .clk      (sc_clk),
    .rst_n    (rst_n),
    .req_put  (sc_req_put),
    .data_put (sc_data_put),
    .full     (sc_full),
    .req_get  (sc_req_get),
    .data_get (sc_data_get),
    .valid_get(sc_valid_get),
    .empty    (sc_empty)
  );

  mixed_clock_fifo #(.NCELLS(NCELLS), .DATA_W(DATA_W)) u_mc_fifo (
    .clk_put  (mc_clk_put),
    .clk_get  (mc_clk_get),
    .rst_n    (rst_n),
    .req_put  (mc_req_put),
    .data_put (mc_data_put),
    .full     (mc_full),
    .req_get  (mc_req_get),
    .data_get (mc_data_get),
    .valid_get(mc_valid_get),
    .empty    (mc_empty)
  );

  // Relay-station link. Stage k of a chain feeds stage k+1; index 0 is the
  // stage nearest the sender (put chain) or nearest the FIFO (get chain).
  logic [N_RS_PUT:0]             lp_valid, lp_stop;
  logic [N_RS_PUT:0][DATA_W-1:0] lp_data;
  logic [N_RS_GET:0]             rp_valid, rp_stop;
  logic [N_RS_GET:0][DATA_W-1:0] rp_data;

  assign lp_valid[0] = rs_in_valid;
  assign lp_data[0]  = rs_in_data;
  assign rs_in_stop  = lp_stop[0];

  for (genvar k = 0; k < N_RS_PUT; k++) begin : g_rs_put
    relay_station #(.DATA_W(DATA_W)) u_rs (
      .clk      (rs_clk_put),
      .rst_n    (rst_n),
      .in_valid (lp_valid[k]),
      .in_data  (lp_data[k]),
      .stop_out (lp_stop[k]),
      .out_valid(lp_valid[k+1]),
      .out_data (lp_data[k+1]),
      .stop_in  (lp_stop[k+1])
    );
  end

  relay_station_fifo #(.NCELLS(NCELLS), .DATA_W(DATA_W)) u_rs_fifo (
    .clk_put  (rs_clk_put),
    .clk_get  (rs_clk_get),
    .rst_n    (rst_n),
    .req_put  (lp_valid[N_RS_PUT]),
    .data_put (lp_data[N_RS_PUT]),
    .stop_out (lp_stop[N_RS_PUT]),
    .valid_get(rp_valid[0]),
    .data_get (rp_data[0]),
    .stop_in  (rp_stop[0])
  );

  for (genvar k = 0; k < N_RS_GET; k++) begin : g_rs_get
    relay_station #(.DATA_W(DATA_W)) u_rs (
      .clk      (rs_clk_get),
      .rst_n    (rst_n),
      .in_valid (rp_valid[k]),
      .in_data  (rp_data[k]),
      .stop_out (rp_stop[k]),
      .out_valid(rp_valid[k+1]),
      .out_data (rp_data[k+1]),
      .stop_in  (rp_stop[k+1])
    );
  end

  assign rs_out_valid       = rp_valid[N_RS_GET];
  assign rs_out_data        = rp_data[N_RS_GET];
  assign rp_stop[N_RS_GET]  = rs_out_stop;

endmodule
