// crc_top: all-digital clock recovery circuit (timed model of the full loop).
//
// The loop turns the width of a data bit into the period of an oscillator.
// A rising data edge launches a pulse down a tapped delay line; the next
// falling edge captures which tap the pulse has reached, which is the bit
// duration measured in taps. The captured tap selects the matching phase of
// a second, identical delay line, and that phase, restored by a Schmitt
// trigger, is fed back into the positive-edge detector as the recovered
// clock. The ring thus has a total delay of one bit cell and keeps
// oscillating at the bit rate without further data edges; every rising data
// edge relaunches the pulse and so realigns the clock phase to the data, and
// every falling edge re-measures the period.
//
// Blocks: crc_ped (edge detector for data and clock), crc_ned (capture pulse
// pair), two crc_delay_line (P1..Pn and CK1..CKn), crc_pccm (flip-flops and
// transmission-gate mux), crc_schmitt. The architecture follows the circuit
// description. All delays are parameters in picoseconds; their defaults are
// this model's, chosen so that a 500 ps bit cell (2 Gb/s) falls inside the
// capture window of the default delay line. The data rate range moves with
// N_FIXED, the fixed delay inside the edge detector.
//
// A data edge that is out of phase with the loop (a phase step) leaves a
// second, stale pulse circulating. The next falling edge then latches two
// separate positions; with two non-adjacent phases connected the mux node
// never reaches the Schmitt threshold, the loop stops, and the following
// capture, which finds only the data-launched pulse, restarts it in phase
// with the data. How the stale pulse leaves the ring is not stated in the
// description; this mechanism is this model's, and it needs the capture
// window (N_TAPS*2*T_INV) to span about one bit period.
//
// The design is a ring oscillator, so synthesis tools report a
// combinational loop through it, and the pulsed flip-flops and the Schmitt
// trigger are latches. Both are intended: this is a timed model for
// simulation, not logic to be mapped by synthesis.
//
// Interface: rst_n (asynchronous, active low; clears the captured period),
// din (NRZ data), clk_out (recovered clock), and the internal pulses and
// selection brought out for observation.
// Timing: the loop period is (N_FIXED+3)*T_INV + (2*T_INV per tap of the
// selected position) + the node and Schmitt delays; the first clock edge
// appears within two data transitions after reset.
module crc_top
  import crc_pkg::*;
#(
  parameter int unsigned T_INV     = 15,   // delay of one gate, ps
  parameter int unsigned N_TAPS    = 18,   // taps per delay line
  parameter int unsigned N_PW      = 3,    // pulse width in inverter delays
  parameter int unsigned N_FIXED   = 5,    // fixed delay of the edge detector
  parameter int unsigned MATCH_DLY = 118,  // matching delay on din, ps
  parameter int unsigned TAU_STEPS = 20,   // Clkfb node time constant, ps
  parameter int unsigned T_ST      = 27    // Schmitt trigger delay, ps
) (
  input  logic             rst_n,
  input  logic             din,
  output logic             clk_out,
  output logic             p0,
  output logic             t,
  output logic             tb,
  output logic [N_TAPS:1]  sel,
  output level_t           clkfb
);
  timeunit 1ps;
  timeprecision 1ps;

  logic            clk0;
  logic [N_TAPS:1] p;
  logic [N_TAPS:1] ck;

  crc_ped #(
    .T_INV(T_INV), .N_PW(N_PW), .N_FIXED(N_FIXED), .MATCH_DLY(MATCH_DLY)
  ) u_ped (
    .din(din), .fb_clk(clk_out), .clk0(clk0), .p0(p0)
  );

  crc_delay_line #(.N_TAPS(N_TAPS), .T_INV(T_INV)) u_line_p  (.in(p0),   .tap(p));
  crc_delay_line #(.N_TAPS(N_TAPS), .T_INV(T_INV)) u_line_ck (.in(clk0), .tap(ck));

  crc_ned #(.T_INV(T_INV), .N_PW(N_PW)) u_ned (.din(din), .t(t), .tb(tb));

  crc_pccm #(.N_TAPS(N_TAPS), .STEP(1), .TAU_STEPS(TAU_STEPS)) u_pccm (
    .rst_n(rst_n), .t(t), .tb(tb), .p(p), .ck(ck), .sel(sel), .clkfb(clkfb)
  );

  crc_schmitt #(.T_ST(T_ST)) u_schmitt (
    .rst_n(rst_n), .level(clkfb), .clk_out(clk_out)
  );
endmodule
