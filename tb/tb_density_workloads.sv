// tb_density_workloads: the three traffic-density scenarios end to end.
//
// Each scenario is a low, medium or high density on every approach,
// standing for the light (2-3 vehicles), moderate (5-6) and heavy (8-10)
// traffic the vehicle detector classifies. For each, the host sends one
// byte with the same class in all four fields, the manual reset is pressed
// so the round starts clean, and one full round of the four directions is
// timed. Scaled clock: one second = 100 clocks, 10 clocks per serial bit.
// Checks: the byte reaches the density registers within 10 bit times of
// its start bit (the serial share of the host-to-lights latency), every
// green lasts the class's time and the round lasts 4 * (green + 3 + 2) s:
// 40, 60 and 80 s.
module tb_density_workloads;
  import traffic_pkg::*;

  localparam int unsigned CLK_HZ = 100;
  localparam int unsigned BAUD   = 10;
  localparam int unsigned CPB    = CLK_HZ / BAUD;

  logic        clk = 1'b0;
  logic        key_reset_n;
  logic        uart_rxd;
  logic [11:0] traffic_lights;
  logic [6:0]  hex0, hex1;
  logic [7:0]  led_density;
  logic        led_rx_seen, led_rx_toggle, led_frame_err;
  dir_t        led_dir;
  phase_t      led_phase;

  traffic_top #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  function automatic logic [11:0] green_bus(int d);
    logic [11:0] b = 12'b001_001_001_001;
    b[3*d] = 1'b0; b[3*d+2] = 1'b1;
    return b;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string      name [3] = '{"low", "medium", "high"};
    logic [1:0] cls  [3] = '{2'b00, 2'b01, 2'b10};
    int         gsec [3] = '{5, 10, 15};
    longint t_start, t_round, t_green;
    int d;
    uart_rxd = 1'b1;
    key_reset_n = 1'b1;
    #1 key_reset_n = 1'b0;
    repeat (3) @(negedge clk);
    key_reset_n = 1'b1;
    for (int s = 0; s < 3; s++) begin
      // Host sends the scenario's byte.
      @(negedge clk); uart_rxd = 1'b0; t_start = cyc;
      repeat (CPB) @(negedge clk);
      for (int i = 0; i < 8; i++) begin
        uart_rxd = cls[s][i % 2]; repeat (CPB) @(negedge clk);
      end
      uart_rxd = 1'b1;
      while (led_density != {4{cls[s]}} && cyc < t_start + 20 * CPB) @(negedge clk);
      check(led_density == {4{cls[s]}}, $sformatf("%s byte received", name[s]));
      check(cyc - t_start <= 10 * CPB, $sformatf("byte latency %0d clocks", cyc - t_start));
      // Clean start of the round.
      key_reset_n = 1'b0; @(negedge clk); key_reset_n = 1'b1;
      check(led_density == 8'h00, "reset clears the density");
      // Resend the byte: the reset cleared it; it arrives during North's
      // first green, so that green is the low one and is skipped here.
      @(negedge clk); uart_rxd = 1'b0;
      repeat (CPB) @(negedge clk);
      for (int i = 0; i < 8; i++) begin
        uart_rxd = cls[s][i % 2]; repeat (CPB) @(negedge clk);
      end
      uart_rxd = 1'b1;
      // Time one full round, East green to East green.
      while (traffic_lights != green_bus(2)) @(negedge clk);
      t_round = cyc;
      for (int k = 0; k < 4; k++) begin
        d = (2 + 3 * k) % 4;   // East, South, West, North
        while (traffic_lights != green_bus(d)) @(negedge clk);
        t_green = cyc;
        while (traffic_lights == green_bus(d)) @(negedge clk);
        check(cyc - t_green == longint'(gsec[s] * CLK_HZ),
              $sformatf("%s: dir %0d green %0d clocks", name[s], d, cyc - t_green));
      end
      while (traffic_lights != green_bus(2)) @(negedge clk);
      check(cyc - t_round == longint'(4 * (gsec[s] + 5) * CLK_HZ),
            $sformatf("%s: round %0d clocks", name[s], cyc - t_round));
      $display("%s density: round of %0d s", name[s], (cyc - t_round) / CLK_HZ);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
