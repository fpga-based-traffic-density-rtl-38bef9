// traffic_top: FPGA side of the traffic-density driven signal controller.
//
// A host PC counts the vehicles waiting in each of the four approaches of
// an intersection, classifies each as low (00), medium (01) or high
// (10/11) density, and sends the four classes over a serial line. This
// top receives them and runs the lights:
//
//   uart_rx  -> density_regs -> traffic_fsm -> lamp bus (12 LEDs)
//                                   |       -> countdown_display -> HEX1:HEX0
//   clock_divider (1 s tick) -------+
//   reset_sync (manual reset button) -> every block
//
// Interface:
//   clk              board clock, CLK_HZ
//   key_reset_n      manual reset push-button, low when pressed
//   uart_rxd         serial input from the host (8N1, BAUD)
//   traffic_lights   lamp bus: bit 3*d+0 red, +1 yellow, +2 green of
//                    direction d, with d = 0 West, 1 South, 2 East, 3 North
//   hex0, hex1       units and tens digit of the countdown, active-low
//                    segments a..g in bits 0..6
//   led_density      last density byte received (debug)
//   led_rx_seen      set once a byte has been received since reset (debug)
//   led_rx_toggle    toggles on every byte received (debug)
//   led_frame_err    set by a frame with a bad stop bit, cleared by the
//                    next good byte (debug)
//   led_dir, led_phase  the controller state (debug)
//
// Timing: a density byte is in the registers about 9.5 bit times after its
// start bit begins and is used at the next green of each direction. Phase
// changes happen on the one-second tick.
//
// The block structure (UART, FSM, clock divider, 7-segment display), the
// lamp bus layout, the fixed 3 s yellow and 2 s red, the density classes
// and the debug LEDs for reception and FSM state follow the design; the
// clock and baud rate, the green times and the byte layout are choices of
// this implementation (see the blocks' own headers).
module traffic_top
  import traffic_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 50_000_000,
  parameter int unsigned BAUD         = 9_600,
  parameter int unsigned TICK_HZ      = 1,
  parameter int unsigned GREEN_LOW    = 5,
  parameter int unsigned GREEN_MEDIUM = 10,
  parameter int unsigned GREEN_HIGH   = 15
) (
  input  logic        clk,
  input  logic        key_reset_n,
  input  logic        uart_rxd,
  output logic [11:0] traffic_lights,
  output logic [6:0]  hex0,
  output logic [6:0]  hex1,
  output logic [7:0]  led_density,
  output logic        led_rx_seen,
  output logic        led_rx_toggle,
  output logic        led_frame_err,
  output dir_t        led_dir,
  output phase_t      led_phase
);

  logic                    rst;
  logic [7:0]              rx_data;
  logic                    rx_valid, rx_err;
  density_t [NUM_DIRS-1:0] density;
  logic                    tick;
  lamp_t    [NUM_DIRS-1:0] lamps;
  logic     [SEC_W-1:0]    remaining;
  logic                    show;

  reset_sync #(.STAGES(2)) u_reset (
    .clk   (clk),
    .btn_n (key_reset_n),
    .rst   (rst)
  );

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk       (clk),
    .rst       (rst),
    .rx        (uart_rxd),
    .data      (rx_data),
    .valid     (rx_valid),
    .frame_err (rx_err)
  );

  density_regs u_density (
    .clk     (clk),
    .rst     (rst),
    .load    (rx_valid),
    .byte_in (rx_data),
    .density (density),
    .raw     (led_density),
    .seen    (led_rx_seen)
  );

  clock_divider #(.CLK_HZ(CLK_HZ), .TICK_HZ(TICK_HZ)) u_div (
    .clk  (clk),
    .rst  (rst),
    .tick (tick)
  );

  traffic_fsm #(
    .GREEN_LOW    (GREEN_LOW),
    .GREEN_MEDIUM (GREEN_MEDIUM),
    .GREEN_HIGH   (GREEN_HIGH)
  ) u_fsm (
    .clk         (clk),
    .rst         (rst),
    .tick        (tick),
    .density     (density),
    .lamps       (lamps),
    .remaining   (remaining),
    .show        (show),
    .dir         (led_dir),
    .phase       (led_phase),
    .phase_start ()
  );

  countdown_display u_disp (
    .value (remaining),
    .show  (show),
    .hex0  (hex0),
    .hex1  (hex1)
  );

  assign traffic_lights = lamps;

  // Debug indicators for serial reception.
  always_ff @(posedge clk) begin
    if (rst) begin
      led_rx_toggle <= 1'b0;
      led_frame_err <= 1'b0;
    end else begin
      if (rx_valid) begin
        led_rx_toggle <= ~led_rx_toggle;
        led_frame_err <= 1'b0;
      end else if (rx_err) begin
        led_frame_err <= 1'b1;
      end
    end
  end

endmodule
