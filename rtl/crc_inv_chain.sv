// crc_inv_chain: a chain of N inverters, each with propagation delay T_INV.
//
// Timed model of a plain inverter string. The output is the input delayed by
// N*T_INV picoseconds, inverted when N is odd. Used for the pulse-width
// inverters and the fixed delay of the edge detectors. Delays are transport
// delays: any pulse wider than zero passes through. Not synthesizable into a
// delay; it is a timing model of a standard-cell chain.
module crc_inv_chain #(
  parameter int unsigned N     = 3,   // number of inverters, at least 1
  parameter int unsigned T_INV = 15   // delay of one inverter, ps
) (
  input  logic a,
  output logic y
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N:0] node;

  assign node[0] = a;
  for (genvar i = 0; i < N; i++) begin : g_inv
    assign #(T_INV) node[i+1] = ~node[i];
  end
  assign y = node[N];
endmodule
