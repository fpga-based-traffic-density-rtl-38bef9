// tb_traffic_top_full: one complete turn of the controller at full size.
//
// The top runs with its default parameters: 50 MHz clock, 9600 baud, one
// tick per second. After the manual reset the host sends one density byte
// (North medium, East high, South low, West medium) during North's first
// green. The test then follows one full turn of North, green 5 s (class
// 00 sampled at reset), yellow 3 s, all-red 2 s, and the start of East's
// green, and checks:
//   - the byte arrives intact on the debug LEDs;
//   - each phase lasts its time to within 4 clocks of N * 50,000,000;
//   - the lamp bus and the two countdown digits in the middle of every
//     second, and the dark display during all-red;
//   - East's green then shows 15 (high class from the byte).
module tb_traffic_top_full;
  import traffic_pkg::*;

  localparam longint CLK_HZ = 50_000_000;
  localparam int     CPB    = 50_000_000 / 9_600;

  logic        clk = 1'b0;
  logic        key_reset_n;
  logic        uart_rxd;
  logic [11:0] traffic_lights;
  logic [6:0]  hex0, hex1;
  logic [7:0]  led_density;
  logic        led_rx_seen, led_rx_toggle, led_frame_err;
  dir_t        led_dir;
  phase_t      led_phase;

  traffic_top dut (.*);

  always #10 clk = ~clk;   // 20 ns period

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  function automatic logic [11:0] exp_bus(int d, int ph);
    logic [11:0] b = 12'b001_001_001_001;
    if (ph == 0) begin b[3*d] = 1'b0; b[3*d+2] = 1'b1; end
    if (ph == 1) begin b[3*d] = 1'b0; b[3*d+1] = 1'b1; end
    return b;
  endfunction

  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                      "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};
  function automatic logic [6:0] pattern(int digit);
    logic [6:0] p = 7'h7F;
    string s = lit[digit];
    for (int i = 0; i < s.len(); i++) p[3'(s[i] - "a")] = 1'b0;
    return p;
  endfunction

  task automatic send(logic [7:0] b);
    @(negedge clk); uart_rxd = 1'b0;
    repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin uart_rxd = b[i]; repeat (CPB) @(negedge clk); end
    uart_rxd = 1'b1; repeat (CPB) @(negedge clk);
  endtask

  // Follow one phase of `secs` seconds that began at cycle t0; return the
  // cycle at which it ended.
  task automatic follow(int d, int ph, int secs, longint t0, output longint t1);
    int k;
    for (int s = 0; s < secs; s++) begin
      while (cyc < t0 + longint'(s) * CLK_HZ + CLK_HZ / 2) @(negedge clk);
      k = secs - s;
      check(traffic_lights == exp_bus(d, ph),
            $sformatf("bus %03h, expected dir %0d phase %0d", traffic_lights, d, ph));
      if (ph == 2) check(hex0 == 7'h7F && hex1 == 7'h7F, "display dark in all-red");
      else check(hex0 == pattern(k % 10) && hex1 == ((k < 10) ? 7'h7F : pattern(k / 10)),
                 $sformatf("display shows %0d", k));
    end
    while (traffic_lights == exp_bus(d, ph)) @(negedge clk);
    t1 = cyc;
    check(t1 - t0 >= longint'(secs) * CLK_HZ && t1 - t0 <= longint'(secs) * CLK_HZ + 4,
          $sformatf("dir %0d phase %0d lasted %0d clocks", d, ph, t1 - t0));
  endtask

  initial begin
    repeat (700_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0, t1, t2, t3;
    uart_rxd = 1'b1;
    key_reset_n = 1'b1;
    #1 key_reset_n = 1'b0;               // press: asynchronous reset
    repeat (5) @(negedge clk);
    key_reset_n = 1'b1;
    t0 = cyc;
    repeat (1000) @(negedge clk);
    send({2'b01, 2'b10, 2'b00, 2'b01});
    repeat (3) @(negedge clk);
    check(led_density == 8'b01_10_00_01 && led_rx_seen && !led_frame_err, "byte received");
    follow(3, 0, 5, t0, t1);
    follow(3, 1, 3, t1, t2);
    follow(3, 2, 2, t2, t3);
    repeat (10) @(negedge clk);
    check(traffic_lights == exp_bus(2, 0), "East green after the North turn");
    check(hex1 == pattern(1) && hex0 == pattern(5), "East green of 15 s from the byte");
    $display("one turn took %0d clocks", t3 - t0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
