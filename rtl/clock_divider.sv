// clock_divider: one-second time base for the phase timers.
//
// A counter runs from 0 to CLK_HZ/TICK_HZ - 1 on the board clock and wraps;
// tick is high for the one clock in which it wraps. Reset clears the
// counter, so the first tick comes exactly CLK_HZ/TICK_HZ clocks after
// reset is released, and one every CLK_HZ/TICK_HZ clocks after that.
//
// The block appears by name in the design; its use as a strobe (rather
// than as a slow derived clock) and the 50 MHz board clock are choices of
// this implementation, so the whole design stays on one clock.
module clock_divider #(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned TICK_HZ = 1
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);

  localparam int unsigned DIV   = CLK_HZ / TICK_HZ;
  localparam int unsigned CNT_W = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CNT_W-1:0] cnt;

  initial begin
    assert (DIV >= 2) else $error("clock_divider: CLK_HZ/TICK_HZ must be at least 2");
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CNT_W'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

endmodule
