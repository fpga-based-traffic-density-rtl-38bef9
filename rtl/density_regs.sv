// density_regs: latest traffic-density class of each direction.
//
// The host sends the four 2-bit density classes packed in one byte. Each
// direction's field sits at the position of its lamp head on the lamp bus:
// bits [1:0] West, [3:2] South, [5:4] East, [7:6] North. On load the whole
// byte replaces the four stored classes; between loads they hold. After
// reset every direction reads low density (00) until the first byte
// arrives.
//
// Interface: load/byte_in come from the UART receiver (one-clock strobe).
// density[d] is the stored class of direction d (traffic_pkg::dir_t order);
// raw is the stored byte, and seen is set once any byte has been loaded.
// Timing: the new classes are visible the clock after load.
//
// The 00/01/10/11 classes are the design's; packing all four in one byte,
// the field order and the reset value are choices of this implementation.
module density_regs
  import traffic_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    load,
  input  logic [7:0]              byte_in,
  output density_t [NUM_DIRS-1:0] density,
  output logic [7:0]              raw,
  output logic                    seen
);

  always_ff @(posedge clk) begin
    if (rst) begin
      raw  <= '0;
      seen <= 1'b0;
    end else if (load) begin
      raw  <= byte_in;
      seen <= 1'b1;
    end
  end

  always_comb begin
    for (int d = 0; d < NUM_DIRS; d++) density[d] = density_t'(raw[2*d +: 2]);
  end

endmodule
