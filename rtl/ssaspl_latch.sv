// ssaspl_latch: static differential sense-amplifier shared pulsed latch
// (SSASPL), the storage element of the shift register.
//
// The transistor cell is a cross-coupled inverter pair (Q, Qb) with two
// nMOS data transistors (D on the Qb side, Db on the Q side) sharing one
// nMOS foot switch driven by the pulsed clock. While the pulse is high the
// data transistor whose gate is high pulls its side low, so Q takes the
// value of D and Qb its complement; while the pulse is low the inverter pair
// holds the bit. This module is the logic-level equivalent of that cell: a
// level-sensitive latch, transparent during the pulse.
//
// Interface: pulse (pulsed clock), d / d_b (differential data, expected to
// be complementary), q / q_b (stored bit and its complement).
// Timing: transparent while pulse = 1, opaque while pulse = 0. If d and d_b
// are equal during a pulse neither pull-down wins cleanly; this model then
// keeps the stored bit (a choice of this model; the cell's behaviour there is
// not specified) and an assertion flags it.
//
// The latch inferred here is intentional: it is the storage element of the
// design, and every storage bit of the shift register is such a latch.
module ssaspl_latch (
  input  logic pulse,
  input  logic d,
  input  logic d_b,
  output logic q,
  output logic q_b
);
  timeunit 1ps;
  timeprecision 1ps;

  logic state;

  always_latch begin
    if (pulse && (d != d_b)) state <= d;
  end

  assign q   = state;
  assign q_b = ~state;

  // The differential inputs must be complementary whenever the latch is open.
  a_diff_inputs: assert property (@(posedge pulse) d != d_b)
    else $error("ssaspl_latch: d and d_b equal while pulsed");
endmodule
