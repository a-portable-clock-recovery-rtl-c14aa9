// crc_pff: pulsed flip-flop of the period-capturing bank.
//
// While the capture pulse pair is active (t high and tb low) the flip-flop is
// transparent and follows its delay-line tap d; when the pair ends it holds
// the last value. A 1 therefore means that the travelling pulse was at this
// tap when the data fell, and q then enables the transmission gate of the
// matching clock phase. Being clocked by the complementary pulses t/tb and
// enabling that gate follow the circuit description; the asynchronous
// active-low clear rst_n is this design's addition so that simulation and
// power-up start with no phase selected (the description names no reset).
//
// Interface: d (tap Pi), t, tb (capture pulses), rst_n, q (gate enable).
// Timing: level-sensitive; q follows d with no delay while the window is
// open. This is a latch by design.
module crc_pff (
  input  logic rst_n,
  input  logic d,
  input  logic t,
  input  logic tb,
  output logic q
);
  timeunit 1ps;
  timeprecision 1ps;

  always_latch begin
    if (!rst_n)
      q = 1'b0;
    else if (t && !tb)
      q = d;
  end
endmodule
