// tb_traffic_top: end-to-end test of the traffic controller.
//
// The host side is modelled by a serial transmitter task (8N1) that sends
// density bytes to the top's UART input. The clock is scaled so that one
// "second" is 200 clocks and one serial bit 10 clocks (CLK_HZ = 200,
// BAUD = 20); the green times keep their defaults.
//
// A monitor watches the 12-bit lamp bus and checks, independently of the
// RTL, that:
//   - the directions are served North, East, South, West, one at a time,
//     each green followed by its yellow and then an all-red interval;
//   - every green lasts 5/10/15 s for the class (00/01/1x) of the last
//     byte completely received before that green began, yellow 3 s and
//     all-red 2 s, to the clock (the first phase after reset within 4);
//   - the two digits show the remaining seconds in the middle of every
//     second of a green or yellow phase and are dark during all-red;
//   - the debug LEDs show the last byte, reception and the FSM state.
// The main process sends several density bytes (each class for each
// direction at least once), a frame with a bad stop bit that must be
// dropped, and presses the manual reset in the middle of a round.
// Every mechanism is counted; one that never happened is a failure.
module tb_traffic_top;
  import traffic_pkg::*;

  localparam int unsigned CLK_HZ = 200;
  localparam int unsigned BAUD   = 20;
  localparam int unsigned DIV    = CLK_HZ;
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

  // Mechanism counters.
  int n_bytes = 0, n_frame_err = 0, n_reset = 0, n_deferred = 0;
  int n_yellow = 0, n_allred = 0, n_blank = 0, n_digits = 0;
  int class_used [4];
  int dir_served [4];

  // Density byte in effect, as the host knows it.
  logic [7:0] eff = 8'h00;
  bit         mon_en = 1'b0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  // Lamp bus expected for direction d (0 W .. 3 N) in phase ph (0 green,
  // 1 yellow, 2 all red), from the pin table of the intersection.
  function automatic logic [11:0] exp_bus(int d, int ph);
    logic [11:0] b = 12'b001_001_001_001;
    if (ph == 0) begin b[3*d] = 1'b0; b[3*d+2] = 1'b1; end
    if (ph == 1) begin b[3*d] = 1'b0; b[3*d+1] = 1'b1; end
    return b;
  endfunction

  function automatic int green_len(logic [1:0] c);
    return (c == 2'b00) ? 5 : (c == 2'b01) ? 10 : 15;
  endfunction

  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                      "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};
  function automatic logic [6:0] pattern(int digit);
    logic [6:0] p = 7'h7F;
    string s = lit[digit];
    for (int i = 0; i < s.len(); i++) p[3'(s[i] - "a")] = 1'b0;
    return p;
  endfunction

  // Host transmitter.
  task automatic send(logic [7:0] b, bit stop_bit);
    @(negedge clk); uart_rxd = 1'b0;
    repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin uart_rxd = b[i]; repeat (CPB) @(negedge clk); end
    uart_rxd = stop_bit; repeat (CPB) @(negedge clk);
    uart_rxd = 1'b1;
    repeat (2) @(negedge clk);
    if (stop_bit) begin
      eff = b;
      n_bytes++;
      check(led_density == b && led_rx_seen && !led_frame_err,
            $sformatf("debug LEDs after byte %02h: %02h", b, led_density));
    end else begin
      n_frame_err++;
      check(led_frame_err && led_density == eff, "bad frame flagged and dropped");
    end
  endtask

  task automatic wait_for(int d, int ph);
    do @(negedge clk); while (traffic_lights != exp_bus(d, ph));
  endtask

  // Lamp-bus monitor.
  initial begin
    logic [11:0] prev;
    longint start;
    int cd, cph, len, k, el, cls;
    bit first, after_reset;
    forever begin
      @(negedge clk);
      if (!mon_en) begin first = 1'b1; continue; end
      if (first) begin
        check(traffic_lights == exp_bus(3, 0), "North green after reset");
        cd = 3; cph = 0; cls = int'(eff[7:6]); len = green_len(2'(cls));
        class_used[cls]++; dir_served[3]++;
        prev = traffic_lights; start = cyc; first = 1'b0; after_reset = 1'b1;
        continue;
      end
      el = int'(cyc - start);
      if (traffic_lights != prev) begin
        if (after_reset)
          check(el >= len * int'(DIV) && el <= len * int'(DIV) + 4,
                $sformatf("first phase lasted %0d clocks, expected %0d s", el, len));
        else
          check(el == len * int'(DIV),
                $sformatf("dir %0d phase %0d lasted %0d clocks, expected %0d s",
                          cd, cph, el, len));
        after_reset = 0;
        if (cph == 0 && int'(eff[2*cd +: 2]) != cls) n_deferred++;
        // Next phase.
        if (cph == 0) begin cph = 1; len = 3; n_yellow++; end
        else if (cph == 1) begin cph = 2; len = 2; n_allred++; end
        else begin
          cph = 0; cd = (cd + 3) % 4;
          cls = int'(eff[2*cd +: 2]); len = green_len(2'(cls));
          class_used[cls]++; dir_served[cd]++;
        end
        check(traffic_lights == exp_bus(cd, cph),
              $sformatf("bus %03h, expected dir %0d phase %0d", traffic_lights, cd, cph));
        prev = traffic_lights; start = cyc;
      end else if (el % int'(DIV) == int'(DIV / 2)) begin
        k = len - el / int'(DIV);
        check(int'(led_dir) == cd && int'(led_phase) == cph, "debug state LEDs");
        if (cph == 2) begin
          check(hex0 == 7'h7F && hex1 == 7'h7F, "display dark in all-red");
          n_blank++;
        end else begin
          check(hex0 == pattern(k % 10) &&
                hex1 == ((k < 10) ? 7'h7F : pattern(k / 10)),
                $sformatf("display %07b %07b, expected %0d", hex1, hex0, k));
          n_digits++;
        end
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    uart_rxd = 1'b1;
    key_reset_n = 1'b1;
    #1 key_reset_n = 1'b0;               // press: asynchronous reset
    repeat (5) @(negedge clk);
    key_reset_n = 1'b1;
    repeat (2) @(negedge clk);
    mon_en = 1'b1;
    check(!led_rx_seen && led_density == 8'h00, "no density after reset");
    // Round 1: all low from reset. During North's green, send
    // N=10 E=01 S=11 W=00; North keeps its low green this time.
    repeat (50) @(negedge clk);
    send({2'b10, 2'b01, 2'b11, 2'b00}, 1'b1);
    wait_for(2, 1);                     // East yellow
    send(8'h55, 1'b0);                  // bad stop bit: dropped
    // Round 2: North starts with 10.
    wait_for(3, 0);
    repeat (30) @(negedge clk);
    send({2'b01, 2'b11, 2'b00, 2'b10}, 1'b1);
    wait_for(3, 0);
    repeat (30) @(negedge clk);
    send({2'b00, 2'b10, 2'b01, 2'b01}, 1'b1);
    // Manual reset during South yellow.
    wait_for(1, 1);
    repeat (70) @(negedge clk);
    mon_en = 1'b0;
    key_reset_n = 1'b0;
    repeat (3) @(negedge clk);
    check(traffic_lights == exp_bus(3, 0) && !led_rx_seen, "reset returns to North green");
    key_reset_n = 1'b1;
    eff = 8'h00;
    n_reset++;
    repeat (2) @(negedge clk);
    mon_en = 1'b1;
    repeat (20) @(negedge clk);
    send({2'b11, 2'b11, 2'b11, 2'b11}, 1'b1);
    wait_for(3, 0);                     // North green again after a full round
    wait_for(3, 1);
    wait_for(2, 0);
    // Summary of mechanisms.
    $display("bytes=%0d frame_errors=%0d resets=%0d deferred=%0d yellow=%0d allred=%0d digits=%0d blank=%0d",
             n_bytes, n_frame_err, n_reset, n_deferred, n_yellow, n_allred, n_digits, n_blank);
    check(n_bytes > 0, "byte reception happened");
    check(n_frame_err > 0, "frame error happened");
    check(n_reset > 0, "manual reset happened");
    check(n_deferred > 0, "mid-green density change deferred");
    check(n_yellow > 0 && n_allred > 0, "yellow and all-red phases happened");
    check(n_digits > 0 && n_blank > 0, "countdown shown and blanked");
    for (int c = 0; c < 4; c++) begin
      $display("class %0d used %0d times, direction %0d served %0d times",
               c, class_used[c], c, dir_served[c]);
      check(class_used[c] > 0, $sformatf("density class %0d used", c));
      check(dir_served[c] > 0, $sformatf("direction %0d served", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
