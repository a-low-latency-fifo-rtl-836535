// empty_detector: tells the get side that the FIFO is (nearly) empty.
//
// empty_p is high when no RUN consecutive cells of the ring (cyclically) are
// full, i.e. when fewer than RUN items are stored (the full cells of the
// FIFO always form one contiguous run from head to tail). The value is
// sampled on CLK_get and passed through SYNC_STAGES flip-flops in series;
// 'empty' is the last of them.
//   Single-clock FIFO: RUN = 1, SYNC_STAGES = 1.
//   Mixed-clock FIFO:  RUN = 2, SYNC_STAGES = 2 (empty when no two
//   consecutive cells are full).
//   Receiver much faster than the sender: RUN = 3, so that the receiver
//   stops before it reaches a cell whose data is still being written.
// Static logic replaces the original precharged dynamic gate. Reset value
// (empty) is this design's choice.
module empty_detector #(
  parameter int unsigned NCELLS      = 8,
  parameter int unsigned RUN         = 2,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic              clk,     // CLK_get
  input  logic              rst_n,
  input  logic [NCELLS-1:0] f,       // f_i of every cell
  output logic              empty
);

  logic                   empty_p;
  logic [SYNC_STAGES-1:0] sync_q;

  // A run of RUN full cells starting at cell i means "not empty".
  always_comb begin
    logic any_run;
    any_run = 1'b0;
    for (int i = 0; i < NCELLS; i++) begin
      logic run_ok;
      run_ok = 1'b1;
      for (int k = 0; k < RUN; k++) run_ok &= f[(i + k) % NCELLS];
      any_run |= run_ok;
    end
    empty_p = ~any_run;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sync_q <= '1;
    else begin
      sync_q[0] <= empty_p;
      for (int s = 1; s < SYNC_STAGES; s++) sync_q[s] <= sync_q[s-1];
    end

  assign empty = sync_q[SYNC_STAGES-1];

endmodule
