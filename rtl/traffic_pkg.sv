// traffic_pkg: types and constants shared by the adaptive traffic-light
// controller.
//
// Directions are numbered in the order of the 12-bit lamp bus of the
// intersection (West, South, East, North from bit 0 upward), so one index
// selects both a lamp head and a 2-bit field of the density byte. The
// controller serves the directions North, East, South, West, which is
// a step downward in this numbering.
//
// A density code is the 2-bit class the vehicle detector assigns to a
// direction: 00 low, 01 medium, 10 or 11 high (both high codes are treated
// alike). The green time of each class is a parameter of the controller;
// the yellow (3 s) and all-red (2 s) times are fixed by the design.
package traffic_pkg;

  // Direction index = position of its lamp head on the lamp bus.
  typedef enum logic [1:0] {
    DIR_WEST  = 2'd0,
    DIR_SOUTH = 2'd1,
    DIR_EAST  = 2'd2,
    DIR_NORTH = 2'd3
  } dir_t;

  localparam int unsigned NUM_DIRS = 4;

  // Density class sent by the detector.
  typedef enum logic [1:0] {
    DENS_LOW    = 2'b00,
    DENS_MEDIUM = 2'b01,
    DENS_HIGH   = 2'b10,
    DENS_HIGH2  = 2'b11
  } density_t;

  // Signal phase of the direction that currently has right of way.
  typedef enum logic [1:0] {
    PH_GREEN  = 2'd0,
    PH_YELLOW = 2'd1,
    PH_RED    = 2'd2   // all-red clearance before the next direction
  } phase_t;

  // One lamp head; red sits in the low bit as on the lamp bus.
  typedef struct packed {
    logic green;
    logic yellow;
    logic red;
  } lamp_t;

  // Width of every seconds counter; two decimal digits are shown.
  localparam int unsigned SEC_W = 7;

  // Fixed intervals in seconds.
  localparam logic [SEC_W-1:0] YELLOW_SECONDS = SEC_W'(3);
  localparam logic [SEC_W-1:0] RED_SECONDS    = SEC_W'(2);

  // Next direction to be served: North -> East -> South -> West -> North.
  function automatic dir_t next_dir(dir_t d);
    return dir_t'(d - 2'd1);
  endfunction

endpackage
