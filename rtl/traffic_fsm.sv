// traffic_fsm: adaptive signal controller for a four-way intersection.
//
// The directions get right of way one at a time, in the order North, East,
// South, West. Each turn has three phases:
//   GREEN  - the served direction shows green for a time chosen from its
//            density class when the phase begins (GREEN_LOW, GREEN_MEDIUM or
//            GREEN_HIGH seconds for class 00, 01, 10/11);
//   YELLOW - the served direction shows yellow for 3 s;
//   RED    - every direction shows red for 2 s (clearance), then the next
//            direction's GREEN begins.
// Every other direction shows red throughout. The density is sampled once,
// at the start of the green phase, so a byte that arrives mid-phase takes
// effect at the next green of that direction.
//
// Interface: tick is the one-second strobe; density[] the stored classes.
// lamps is the 12-bit lamp bus, three bits per direction (red, yellow,
// green from the low bit up), West in bits [2:0] through North in [11:9].
// remaining is the number of seconds left in the phase (its full length
// in the first second, 1 in the last); show is high in the green and
// yellow phases, when the countdown is meant to be displayed. dir/phase
// expose the state, phase_start pulses in the first clock of each phase.
//
// Timing: a phase of N seconds lasts exactly N ticks; the phase changes in
// the clock after the tick that ends it. After reset the controller starts
// in North GREEN.
//
// The fixed yellow and red times, the density classes and the lamp bus
// layout follow the design. The three green times (only described as
// shorter, moderate and extended), the service order, one direction
// at a time, the all-red reading of the 2 s red interval and sampling at
// the start of green are choices of this implementation.
module traffic_fsm
  import traffic_pkg::*;
#(
  parameter int unsigned GREEN_LOW    = 5,
  parameter int unsigned GREEN_MEDIUM = 10,
  parameter int unsigned GREEN_HIGH   = 15
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    tick,
  input  density_t [NUM_DIRS-1:0] density,
  output lamp_t    [NUM_DIRS-1:0] lamps,
  output logic     [SEC_W-1:0]    remaining,
  output logic                    show,
  output dir_t                    dir,
  output phase_t                  phase,
  output logic                    phase_start
);

  initial begin
    assert (GREEN_LOW >= 1 && GREEN_MEDIUM >= 1 && GREEN_HIGH >= 1 &&
            GREEN_LOW <= 99 && GREEN_MEDIUM <= 99 && GREEN_HIGH <= 99)
      else $error("traffic_fsm: green times must be 1..99 s");
  end

  function automatic logic [SEC_W-1:0] green_time(density_t d);
    unique case (d)
      DENS_LOW:    return SEC_W'(GREEN_LOW);
      DENS_MEDIUM: return SEC_W'(GREEN_MEDIUM);
      default:     return SEC_W'(GREEN_HIGH);
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      dir         <= DIR_NORTH;
      phase       <= PH_GREEN;
      remaining   <= green_time(density[DIR_NORTH]);
      phase_start <= 1'b1;
    end else begin
      phase_start <= 1'b0;
      if (tick) begin
        if (remaining > SEC_W'(1)) begin
          remaining <= remaining - 1'b1;
        end else begin
          phase_start <= 1'b1;
          unique case (phase)
            PH_GREEN: begin
              phase     <= PH_YELLOW;
              remaining <= YELLOW_SECONDS;
            end
            PH_YELLOW: begin
              phase     <= PH_RED;
              remaining <= RED_SECONDS;
            end
            default: begin
              phase     <= PH_GREEN;
              dir       <= next_dir(dir);
              remaining <= green_time(density[next_dir(dir)]);
            end
          endcase
        end
      end
    end
  end

  always_comb begin
    for (int d = 0; d < NUM_DIRS; d++) begin
      lamps[d] = '{green: 1'b0, yellow: 1'b0, red: 1'b1};
      if (dir_t'(d) == dir && phase == PH_GREEN)
        lamps[d] = '{green: 1'b1, yellow: 1'b0, red: 1'b0};
      else if (dir_t'(d) == dir && phase == PH_YELLOW)
        lamps[d] = '{green: 1'b0, yellow: 1'b1, red: 1'b0};
    end
  end

  assign show = (phase != PH_RED);

  // At most one direction is ever released (green or yellow).
  assert property (@(posedge clk) disable iff (rst)
    $countones({lamps[0].green | lamps[0].yellow, lamps[1].green | lamps[1].yellow,
                lamps[2].green | lamps[2].yellow, lamps[3].green | lamps[3].yellow}) <= 1);
  assert property (@(posedge clk) disable iff (rst) remaining != '0);

endmodule
