// crc_pkg: shared types and constants of the all-digital clock recovery circuit.
//
// The clock multiplexer output (Clkfb) is a single wire driven through
// several transmission gates at once, so its value is an analog level rather
// than a logic bit. The models carry that level as an unsigned fixed-point
// number, level_t, where 0 is ground and LEVEL_FS is the supply. This
// representation, and the Schmitt thresholds, are choices of this model; the
// circuit description only says that the node is restored by a simple
// Schmitt trigger.
package crc_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned LEVEL_W  = 16;
  typedef logic [LEVEL_W-1:0] level_t;
  localparam level_t LEVEL_FS = '1;

  // Default Schmitt thresholds: 70 % and 20 % of the supply.
  localparam level_t LEVEL_VH = level_t'((32'(LEVEL_FS) * 7) / 10);
  localparam level_t LEVEL_VL = level_t'((32'(LEVEL_FS) * 2) / 10);
endpackage
