// tb_clock_divider: self-checking test of the one-second tick.
//
// With CLK_HZ = 50 and TICK_HZ = 1 the tick must be one clock wide and come
// every 50 clocks, the first 50 clocks after reset is released; a reset in
// between restarts the count.
module tb_clock_divider;
  localparam int unsigned DIV = 50;

  logic clk = 1'b0;
  logic rst;
  logic tick;
  int checks = 0, failures = 0;

  clock_divider #(.CLK_HZ(DIV), .TICK_HZ(1)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count clocks from the release of reset to each tick.
  task automatic run_ticks(int n);
    int gap;
    for (int t = 0; t < n; t++) begin
      gap = 0;
      do begin @(negedge clk); gap++; end while (!tick);
      check(gap == DIV, $sformatf("tick %0d after %0d clocks", t, gap));
      @(negedge clk);
      check(!tick, "tick one clock wide");
      // account for the clock consumed by the width check
      gap = 1;
      do begin @(negedge clk); gap++; end while (!tick && gap < DIV);
      check(tick && gap == DIV, $sformatf("next tick after %0d clocks", gap));
    end
  endtask

  initial begin
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    run_ticks(10);
    // Reset in the middle of a period.
    repeat (17) @(negedge clk);
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    check(!tick, "no tick right after reset");
    run_ticks(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
