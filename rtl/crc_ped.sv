// crc_ped: positive-edge detector of the clock recovery loop (timed model).
//
// Emits one narrow positive pulse on CLK0 and on P0 for every rising edge of
// the data input (after a matching delay) and for every rising edge of the
// recovered clock fed back from the Schmitt trigger. The Din pulse re-times the
// loop to the data; the feedback pulse keeps the loop oscillating when the
// data has no transitions.
//
// Structure, as in the circuit description: each input goes to a NAND gate
// both directly and through N_PW inverters, so the NAND output is low for
// N_PW inverter delays after a rising edge; a second NAND gate merges the two
// paths (a pulse on either input gives a pulse); an odd number N_FIXED of
// inverters then delays the pulse by a fixed amount, which sets the range of
// data rates the loop can follow; a final inverter per output drives the two
// delay lines. The matching delay on Din compensates for the delay of the
// mux node and the Schmitt trigger in the loop, so that the captured period
// equals the bit cell. Its value, N_FIXED, N_PW's use as 3 and T_INV are
// defaults of this model; the circuit description gives no picosecond values.
//
// Interface: din (data), fb_clk (recovered clock); clk0 and p0 are identical
// positive pulses of width N_PW*T_INV.
// Timing: from fb_clk rising to clk0/p0 rising is (N_FIXED+3)*T_INV; from din
// rising it is MATCH_DLY more.
module crc_ped #(
  parameter int unsigned T_INV     = 15,  // delay of one gate, ps
  parameter int unsigned N_PW      = 3,   // inverters setting the pulse width
  parameter int unsigned N_FIXED   = 5,   // odd inverter chain, fixed delay
  parameter int unsigned MATCH_DLY = 118  // matching delay on din, ps
) (
  input  logic din,
  input  logic fb_clk,
  output logic clk0,
  output logic p0
);
  timeunit 1ps;
  timeprecision 1ps;

  logic din_d;        // din after the matching delay
  logic din_dn;       // din_d inverted and delayed by N_PW inverters
  logic fb_dn;        // fb_clk inverted and delayed by N_PW inverters
  logic din_pulse_n;  // low pulse after a rising edge of din_d
  logic fb_pulse_n;   // low pulse after a rising edge of fb_clk
  logic pulse;        // merged positive pulse
  logic pulse_n;      // after the odd fixed-delay chain

  assign #(MATCH_DLY) din_d = din;

  crc_inv_chain #(.N(N_PW), .T_INV(T_INV)) u_pw_din (.a(din_d),  .y(din_dn));
  crc_inv_chain #(.N(N_PW), .T_INV(T_INV)) u_pw_fb  (.a(fb_clk), .y(fb_dn));

  assign #(T_INV) din_pulse_n = ~(din_d  & din_dn);
  assign #(T_INV) fb_pulse_n  = ~(fb_clk & fb_dn);
  assign #(T_INV) pulse       = ~(din_pulse_n & fb_pulse_n);

  crc_inv_chain #(.N(N_FIXED), .T_INV(T_INV)) u_fixed (.a(pulse), .y(pulse_n));

  assign #(T_INV) clk0 = ~pulse_n;
  assign #(T_INV) p0   = ~pulse_n;

  initial begin
    assert (N_FIXED % 2 == 1)
      else $error("crc_ped: N_FIXED must be odd");
  end
endmodule
