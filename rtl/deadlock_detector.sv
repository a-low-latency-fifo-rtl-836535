// deadlock_detector: asks for a dummy item when the receiver could starve.
//
// With the early definition of "empty" (fewer than RUN items), the FIFO can
// hold a valid item that the receiver is never allowed to read. The detector
// raises empty_2 when the FIFO is "empty" in that sense (no RUN consecutive
// full cells) and at least one cell is full and holds a valid item. Only
// cells that are full count, because a cell's validity bit is not cleared
// when it is read. The put controller then enqueues one invalid (dummy) item,
// which makes the FIFO look non-empty to the receiver.
//
// The combinational condition is sampled on CLK_put and passed through
// SYNC_STAGES flip-flops (two in the original circuit). Because of those two
// cycles of delay the condition is still seen for one cycle after the first
// dummy has gone in, so a second dummy can follow while the sender is idle.
// Reset value (no request) is this design's choice.
module deadlock_detector #(
  parameter int unsigned NCELLS      = 8,
  parameter int unsigned RUN         = 2,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic              clk,     // CLK_put
  input  logic              rst_n,
  input  logic [NCELLS-1:0] f,       // f_i of every cell
  input  logic [NCELLS-1:0] v,       // stored validity bit of every cell
  output logic              empty_2
);

  logic                   is_empty, has_valid, dl_p;
  logic [SYNC_STAGES-1:0] sync_q;

  always_comb begin
    logic any_run;
    any_run = 1'b0;
    for (int i = 0; i < NCELLS; i++) begin
      logic run_ok;
      run_ok = 1'b1;
      for (int k = 0; k < RUN; k++) run_ok &= f[(i + k) % NCELLS];
      any_run |= run_ok;
    end
    is_empty = ~any_run;
  end

  assign has_valid = |(f & v);
  assign dl_p      = is_empty & has_valid;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sync_q <= '0;
    else begin
      sync_q[0] <= dl_p;
      for (int s = 1; s < SYNC_STAGES; s++) sync_q[s] <= sync_q[s-1];
    end

  assign empty_2 = sync_q[SYNC_STAGES-1];

endmodule
