// crc_pccm: period capturing and clock muxing (timed model of Clkfb node).
//
// One pulsed flip-flop per tap samples the P delay line while the capture
// pulses t/tb are active, i.e. just after a falling data edge. Each flip-flop
// that holds a 1 turns on the transmission gate of the same-numbered clock
// phase CKi, and all gates drive one common node, Clkfb. When the travelling
// pulse covered two neighbouring taps at the capture instant, two phases are
// connected at once and the node settles between them: its crossing of the
// Schmitt threshold lies between the two phases' edges. This interpolation
// is what gives the loop a resolution finer than one tap.
//
// The flip-flop bank and the gate-per-phase mux follow the circuit
// description. The node is modelled as a first-order RC: every STEP ps its
// level moves 1/TAU_STEPS of the way towards (phases high / phases selected)
// times the supply; with no phase selected it keeps its charge. The RC model
// and its time constant are this model's own choices.
//
// The node update is a timed process; a synthesis tool sees its state as a
// latch in a feedback loop, which is expected for this analog node model.
//
// Interface: rst_n, t, tb, p[1..N] (capture taps), ck[1..N] (clock phases),
// sel[1..N] (flip-flop states), clkfb (node level, crc_pkg::level_t).
// Timing: a single selected phase makes clkfb cross 70 % of the supply about
// 1.2*TAU_STEPS*STEP ps after its rising edge.
module crc_pccm
  import crc_pkg::*;
#(
  parameter int unsigned N_TAPS    = 18,  // taps and flip-flops
  parameter int unsigned STEP      = 1,   // node update step, ps
  parameter int unsigned TAU_STEPS = 20   // node time constant, in steps
) (
  input  logic             rst_n,
  input  logic             t,
  input  logic             tb,
  input  logic [N_TAPS:1]  p,
  input  logic [N_TAPS:1]  ck,
  output logic [N_TAPS:1]  sel,
  output level_t           clkfb
);
  timeunit 1ps;
  timeprecision 1ps;

  for (genvar i = 1; i <= N_TAPS; i++) begin : g_pff
    crc_pff u_pff (.rst_n(rst_n), .d(p[i]), .t(t), .tb(tb), .q(sel[i]));
  end

  int unsigned n_sel;   // phases connected to the node
  int unsigned n_high;  // connected phases that are high
  int          target;  // level the node settles to
  int          level;

  always_comb begin
    n_sel  = $countones(sel);
    n_high = $countones(sel & ck);
  end

  initial level = 0;

  always begin
    #(STEP);
    if (!rst_n) begin
      level = 0;
    end else if (n_sel != 0) begin
      target = int'((longint'(LEVEL_FS) * longint'(n_high)) / longint'(n_sel));
      level  = level + (target - level) / int'(TAU_STEPS);
    end
  end

  assign clkfb = level_t'(level);
endmodule
