// fifo_cell_ring: the circular array of NCELLS identical FIFO cells.
//
// Cell i passes both tokens to cell i+1 (modulo NCELLS). At reset both
// tokens sit at cell 0: the token flip-flops of cell NCELLS-1, which feed
// cell 0, start at one, all others at zero. Every cell listens to the same
// put bus (en_put, req_put, data_put) and the same get enable; the cells'
// read drivers are ORed into one read bus (data_get, valid_i), since at most
// one cell, the one holding the get token, drives it in a cycle.
//
// The full, empty and validity state of every cell is brought out as
// vectors (f, e, v) for the full, empty and deadlock detectors.
// Timing: the put bus is sampled on CLK_put, the read bus is combinational
// from the get token and en_get within the CLK_get cycle.
module fifo_cell_ring #(
  parameter int unsigned NCELLS = 8,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk_put,
  input  logic              clk_get,
  input  logic              rst_n,
  input  logic              en_put,
  input  logic              req_put,
  input  logic [DATA_W-1:0] data_put,
  input  logic              en_get,
  output logic [DATA_W-1:0] data_get,
  output logic              valid_i,
  output logic [NCELLS-1:0] f,
  output logic [NCELLS-1:0] e,
  output logic [NCELLS-1:0] v
);

  logic [NCELLS-1:0]             ptok, gtok;        // token flip-flop of each cell
  logic [NCELLS-1:0][DATA_W-1:0] cell_data;
  logic [NCELLS-1:0]             cell_valid;

  for (genvar i = 0; i < NCELLS; i++) begin : g_cell
    localparam int unsigned PREV = (i + NCELLS - 1) % NCELLS;
    fifo_cell #(
      .DATA_W   (DATA_W),
      .INIT_PTOK(i == NCELLS - 1),
      .INIT_GTOK(i == NCELLS - 1)
    ) u_cell (
      .clk_put (clk_put),
      .clk_get (clk_get),
      .rst_n   (rst_n),
      .en_put  (en_put),
      .req_put (req_put),
      .data_put(data_put),
      .ptok_in (ptok[PREV]),
      .ptok_out(ptok[i]),
      .en_get  (en_get),
      .gtok_in (gtok[PREV]),
      .gtok_out(gtok[i]),
      .data_get(cell_data[i]),
      .valid_i (cell_valid[i]),
      .f_i     (f[i]),
      .e_i     (e[i]),
      .v_i     (v[i])
    );
  end

  // Read bus: OR of all cell drivers (only the reading cell is non-zero).
  always_comb begin
    data_get = '0;
    for (int i = 0; i < NCELLS; i++) data_get |= cell_data[i];
  end
  assign valid_i = |cell_valid;

endmodule
