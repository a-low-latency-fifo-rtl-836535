// full_detector: tells the put side that the FIFO is (nearly) full.
//
// full_p is high when no RUN consecutive cells of the ring (cyclically) are
// empty, i.e. when fewer than RUN empty places are left. The value is
// sampled on CLK_put and passed through SYNC_STAGES flip-flops in series;
// 'full' is the last of them.
//   Single-clock FIFO: RUN = 1, SYNC_STAGES = 1 (full when no cell is empty,
//   latched on the next edge).
//   Mixed-clock FIFO:  RUN = 2, SYNC_STAGES = 2 (full when no two consecutive
//   cells are empty, plus one resynchronizing flip-flop). Each further
//   flip-flop needs RUN one larger, so that the put side is stopped in time.
// The original evaluates full_p with precharged dynamic logic; here it is
// the equivalent static AND/OR function. The reset value (not full) is this
// design's choice.
module full_detector #(
  parameter int unsigned NCELLS      = 8,
  parameter int unsigned RUN         = 2,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic              clk,     // CLK_put
  input  logic              rst_n,
  input  logic [NCELLS-1:0] e,       // e_i of every cell
  output logic              full
);

  logic                   full_p;
  logic [SYNC_STAGES-1:0] sync_q;

  // A run of RUN empty cells starting at cell i means "not full".
  always_comb begin
    logic any_run;
    any_run = 1'b0;
    for (int i = 0; i < NCELLS; i++) begin
      logic run_ok;
      run_ok = 1'b1;
      for (int k = 0; k < RUN; k++) run_ok &= e[(i + k) % NCELLS];
      any_run |= run_ok;
    end
    full_p = ~any_run;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sync_q <= '0;
    else begin
      sync_q[0] <= full_p;
      for (int s = 1; s < SYNC_STAGES; s++) sync_q[s] <= sync_q[s-1];
    end

  assign full = sync_q[SYNC_STAGES-1];

endmodule
