// crc_delay_line: tapped inverter delay line (behavioural timing model).
//
// The circuit uses two identical copies of this line. The first carries the
// pulse P0 and provides P1..Pn to the pulsed flip-flops; the second carries the
// replica CLK0 and provides the clock phases CK1..CKn to the transmission-gate
// mux. Because both lines are built the same way, tap i of one is high exactly
// when tap i of the other is.
//
// Structure: 2*N_TAPS inverters in series, each with delay T_INV. Tap i is
// taken after 2*i inverters, so it is the non-inverted input delayed by
// i*2*T_INV. The lines being plain CMOS inverters follows the circuit
// description; taking a tap after every inverter pair (so taps keep the input
// polarity), the tap count and the inverter delay are this model's choices.
//
// Interface: in drives the line; tap[i] (i = 1..N_TAPS) is phase i.
// Timing: tap[i] follows in after 2*i*T_INV ps.
module crc_delay_line #(
  parameter int unsigned N_TAPS = 18,  // taps P1..Pn / CK1..CKn
  parameter int unsigned T_INV  = 15   // delay of one inverter, ps
) (
  input  logic             in,
  output logic [N_TAPS:1]  tap
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [2*N_TAPS:0] node;

  assign node[0] = in;
  for (genvar j = 0; j < 2*N_TAPS; j++) begin : g_inv
    assign #(T_INV) node[j+1] = ~node[j];
  end
  for (genvar i = 1; i <= N_TAPS; i++) begin : g_tap
    assign tap[i] = node[2*i];
  end
endmodule
