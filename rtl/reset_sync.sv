// reset_sync: reset from the manual push-button.
//
// The button input is active low and asynchronous. Pressing it asserts the
// reset output at once (asynchronously); releasing it lets the output fall
// only after STAGES rising clock edges, in step with the clock, so every
// flip-flop leaves reset in the same cycle.
//
// Interface: btn_n low = pressed; rst is active high.
// Timing: assert immediately, deassert STAGES clocks after release.
//
// The design names a manual reset button for reinitialisation; the
// synchronizer, its depth and the active-low button are choices of this
// implementation.
module reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic btn_n,
  output logic rst
);

  logic [STAGES-1:0] q;

  initial begin
    assert (STAGES >= 2) else $error("reset_sync: STAGES must be at least 2");
  end

  always_ff @(posedge clk or negedge btn_n) begin
    if (!btn_n) q <= '1;
    else        q <= {q[STAGES-2:0], 1'b0};
  end

  assign rst = q[STAGES-1];

endmodule
