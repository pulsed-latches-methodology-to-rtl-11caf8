// sub_shift_register: one SUB_BITS-bit group of the pulsed-latch shift
// register (4 bits in the design).
//
// It is a chain of SUB_BITS data latches followed by one temporary latch T,
// all SSASPL pulsed latches connected Q->D and Qb->Db. Data latch k is opened
// by CLK_pulse<k> and T by CLK_pulse<T>. The generator fires these pulses
// after every rising CLK edge in the order <T>, <SUB_BITS>, ..., <1>, so
// within one cycle T first copies the last data bit, then each data latch
// copies its left neighbour (which has not yet changed), and finally latch 1
// copies the group input. The group input of the next group is this group's
// T, which by then already holds the old last bit: the whole register moves
// one place per cycle even though no latch reads a neighbour that is open.
// T is extra storage used only to hand the last bit to the next group.
//
// Interface: d_in / d_in_b (differential serial input: the shift register
// input for group 1, the previous group's T otherwise), clk_pulse_t,
// clk_pulse[1..SUB_BITS], q[1..SUB_BITS] (the group's data bits, q[1] the
// newest), t / t_b (the temporary latch, to the next group).
// Timing: after the pulse sequence of a cycle, q[k] holds what q[k-1] held
// before it, q[1] holds d_in, and t holds the old q[SUB_BITS].
module sub_shift_register #(
  parameter int unsigned SUB_BITS = plsr_pkg::DEFAULT_SUB_BITS
) (
  input  logic              d_in,
  input  logic              d_in_b,
  input  logic              clk_pulse_t,
  input  logic [SUB_BITS:1] clk_pulse,
  output logic [SUB_BITS:1] q,
  output logic              t,
  output logic              t_b
);
  timeunit 1ps;
  timeprecision 1ps;

  // Node k is the output of data latch k; node 0 is the group input.
  logic [SUB_BITS:0] node;
  logic [SUB_BITS:0] node_b;

  assign node[0]   = d_in;
  assign node_b[0] = d_in_b;

  for (genvar k = 1; k <= SUB_BITS; k++) begin : g_bit
    ssaspl_latch u_latch (
      .pulse (clk_pulse[k]),
      .d     (node[k-1]),
      .d_b   (node_b[k-1]),
      .q     (node[k]),
      .q_b   (node_b[k])
    );
  end

  ssaspl_latch u_temp (
    .pulse (clk_pulse_t),
    .d     (node[SUB_BITS]),
    .d_b   (node_b[SUB_BITS]),
    .q     (t),
    .q_b   (t_b)
  );

  assign q = node[SUB_BITS:1];
endmodule
