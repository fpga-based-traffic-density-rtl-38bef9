// tb_reset_sync: self-checking test of the push-button reset.
//
// Pressing the button (btn_n low) between clock edges must assert rst at
// once, without a clock edge; releasing it must drop rst on exactly the
// second rising edge after release, and random press lengths repeat this.
module tb_reset_sync;
  logic clk = 1'b0;
  logic btn_n;
  logic rst;
  int checks = 0, failures = 0;

  reset_sync #(.STAGES(2)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    btn_n = 1'b1;
    repeat (4) @(posedge clk);
    for (int k = 0; k < 30; k++) begin
      // Press 2 time units after a rising edge: no edge in between.
      @(posedge clk); #2; btn_n = 1'b0; #1;
      check(rst, "reset asserts without a clock edge");
      repeat ($urandom_range(1, 5)) @(posedge clk);
      #2; btn_n = 1'b1;
      @(posedge clk); #1;
      check(rst, "still in reset one edge after release");
      @(posedge clk); #1;
      check(!rst, "reset released on the second edge");
      repeat ($urandom_range(0, 4)) @(posedge clk);
      #1;
      check(!rst, "stays released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
