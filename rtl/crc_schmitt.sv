// crc_schmitt: Schmitt trigger that restores the Clkfb node (timed model).
//
// The mux node can sit between the rails while two phases are connected, so
// it is not fit to drive the edge detector directly. The trigger gives a
// full-swing ClkOut with hysteresis: the output goes high once the node
// rises to VH or above, goes low once it falls to VL or below, and holds in
// between. That restoring role and its place in the loop follow the circuit
// description; the schematic's two series inverters make it non-inverting.
// The threshold values and the delay T_ST (two inverter delays) are this
// model's choices.
//
// Interface: rst_n (forces low), level (node level), clk_out.
// Timing: clk_out follows the hysteresis state after T_ST ps. The state is a
// latch on purpose: hysteresis is memory.
module crc_schmitt
  import crc_pkg::*;
#(
  parameter level_t      VH   = LEVEL_VH,  // rising threshold
  parameter level_t      VL   = LEVEL_VL,  // falling threshold
  parameter int unsigned T_ST = 27         // delay, ps
) (
  input  logic   rst_n,
  input  level_t level,
  output logic   clk_out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic state;

  always_latch begin
    if (!rst_n)
      state = 1'b0;
    else if (level >= VH)
      state = 1'b1;
    else if (level <= VL)
      state = 1'b0;
  end

  assign #(T_ST) clk_out = state;

  initial begin
    assert (VH > VL) else $error("crc_schmitt: VH must exceed VL");
  end
endmodule
