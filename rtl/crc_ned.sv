// crc_ned: negative-edge detector of the clock recovery loop (timed model).
//
// On every falling edge of the data input it emits a positive pulse on t and
// the complementary negative pulse on tb. The pulsed flip-flops of the
// period-capturing block are open while t is high and tb is low, so this pair
// marks the instant at which the position of the travelling pulse in the
// delay line, i.e. the time since the last rising edge, is captured.
//
// Structure: like the positive-edge detector, each output path combines a
// signal with a copy of itself delayed by N_PW inverters in a two-input gate,
// and ends in a two-inverter buffer. The t path works on din directly and the
// tb path on an inverted copy of din, as the schematic shows, so tb lags t by
// one inverter delay. Only the behaviour (complementary pulses on falling
// edges only) is taken from the circuit description; the gate functions used
// here are this model's choice.
//
// Interface: din in; t, tb out.
// Timing (T_INV = d, N_PW = 3): after din falls, t is high from 3d to 6d and
// tb is low from 4d to 7d, so both are active from 4d to 6d.
module crc_ned #(
  parameter int unsigned T_INV = 15,  // delay of one gate, ps
  parameter int unsigned N_PW  = 3    // inverters setting the pulse width
) (
  input  logic din,
  output logic t,
  output logic tb
);
  timeunit 1ps;
  timeprecision 1ps;

  logic din_n;      // din inverted
  logic din_dn;     // din inverted and delayed by N_PW inverters
  logic din_nd;     // din_n inverted and delayed by N_PW inverters
  logic t_raw;      // positive pulse after a falling edge of din
  logic tb_raw;     // negative pulse after a falling edge of din
  logic t_mid, tb_mid;

  assign #(T_INV) din_n = ~din;

  crc_inv_chain #(.N(N_PW), .T_INV(T_INV)) u_pw_t  (.a(din),   .y(din_dn));
  crc_inv_chain #(.N(N_PW), .T_INV(T_INV)) u_pw_tb (.a(din_n), .y(din_nd));

  // Both gate outputs are active while din has fallen but its delayed
  // copy has not yet followed.
  assign #(T_INV) t_raw  = ~(din | din_dn);
  assign #(T_INV) tb_raw = ~(din_n & din_nd);

  assign #(T_INV) t_mid  = ~t_raw;
  assign #(T_INV) t      = ~t_mid;
  assign #(T_INV) tb_mid = ~tb_raw;
  assign #(T_INV) tb     = ~tb_mid;
endmodule
