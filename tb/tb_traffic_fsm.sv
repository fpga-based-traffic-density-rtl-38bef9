// tb_traffic_fsm: self-checking test of the signal controller.
//
// The one-second tick is driven directly, one pulse every 3 clocks. The
// test follows the controller through several full rounds of the four
// directions while the density classes change at random moments, and
// checks against its own expectation:
//   - the service order North, East, South, West;
//   - the length in ticks of every phase: green 5/10/15 s for class
//     00/01/1x as sampled at the start of green, yellow 3 s, red 2 s;
//   - the lamp bus bit by bit (bit 3d red, 3d+1 yellow, 3d+2 green with
//     d = 0 West .. 3 North), the other directions red;
//   - the countdown value (full length down to 1) and its show flag;
//   - the phase_start strobe.
// It counts how often each density class set a green time.
module tb_traffic_fsm;
  import traffic_pkg::*;

  localparam int G_LOW = 5, G_MED = 10, G_HIGH = 15;

  logic                    clk = 1'b0;
  logic                    rst;
  logic                    tick;
  density_t [NUM_DIRS-1:0] density;
  lamp_t    [NUM_DIRS-1:0] lamps;
  logic     [SEC_W-1:0]    remaining;
  logic                    show;
  dir_t                    dir;
  phase_t                  phase;
  logic                    phase_start;

  int checks = 0, failures = 0;
  int class_seen [4];

  traffic_fsm dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int green_len(logic [1:0] c);
    return (c == 2'b00) ? G_LOW : (c == 2'b01) ? G_MED : G_HIGH;
  endfunction

  // Expected lamp bus; d is 0 West, 1 South, 2 East, 3 North. ph: 0 green,
  // 1 yellow, 2 all red.
  function automatic logic [11:0] exp_bus(int d, int ph);
    logic [11:0] b = 12'b001_001_001_001;
    if (ph == 0) begin b[3*d] = 1'b0; b[3*d+2] = 1'b1; end
    if (ph == 1) begin b[3*d] = 1'b0; b[3*d+1] = 1'b1; end
    return b;
  endfunction

  // One tick; phase_start must mark exactly the clocks where a phase begins.
  task automatic one_tick();
    phase_t ph0 = phase;
    dir_t   d0  = dir;
    @(negedge clk); tick = 1'b1;
    @(negedge clk); tick = 1'b0;
    check(phase_start == (phase != ph0 || dir != d0), "phase_start marks a new phase");
    @(negedge clk);
    check(!phase_start, "phase_start one clock wide");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, len, sampled;
    static int order [4] = '{3, 2, 1, 0};   // North, East, South, West
    rst = 1'b1; tick = 1'b0;
    density = '{default: DENS_LOW};
    density[DIR_NORTH] = DENS_HIGH;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int round = 0; round < 6; round++) begin
      for (int k = 0; k < 4; k++) begin
        d = order[k];
        // Green: length set by the class present now (sampled at entry).
        sampled = int'(density[d]);
        len = green_len(2'(sampled));
        class_seen[sampled]++;
        for (int s = len; s >= 1; s--) begin
          check(int'(dir) == d && phase == PH_GREEN,
                $sformatf("round %0d dir %0d green (dir=%0d ph=%0d)", round, d, dir, phase));
          check(lamps == exp_bus(d, 0), $sformatf("green bus %03h", lamps));
          check(int'(remaining) == s && show, $sformatf("green countdown %0d exp %0d", remaining, s));
          // Change the classes at random; the current green must not care.
          if ($urandom_range(0, 3) == 0)
            for (int j = 0; j < 4; j++) density[j] = density_t'($urandom_range(0, 3));
          one_tick();
        end
        for (int s = 3; s >= 1; s--) begin
          check(int'(dir) == d && phase == PH_YELLOW, "yellow");
          check(lamps == exp_bus(d, 1), $sformatf("yellow bus %03h", lamps));
          check(int'(remaining) == s && show, "yellow countdown");
          one_tick();
        end
        for (int s = 2; s >= 1; s--) begin
          check(phase == PH_RED, "all red");
          check(lamps == exp_bus(d, 2), $sformatf("all-red bus %03h", lamps));
          check(int'(remaining) == s && !show, "red countdown hidden");
          one_tick();
        end
      end
    end
    for (int c = 0; c < 4; c++) begin
      check(class_seen[c] > 0, $sformatf("density class %0d never used", c));
      $display("density class %0d set the green time %0d times", c, class_seen[c]);
    end
    // Reset mid-phase returns to North green.
    one_tick();
    rst = 1'b1; @(negedge clk); rst = 1'b0; @(negedge clk);
    check(dir == DIR_NORTH && phase == PH_GREEN, "reset to North green");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
