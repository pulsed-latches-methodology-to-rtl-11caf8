// pulsed_latch_shift_register: WIDTH-bit serial-in, parallel-out shift
// register built from pulsed latches instead of flip-flops.
//
// A chain of pulsed latches clocked by one common pulse fails: a latch's
// input comes from a latch that is open at the same time, so data races
// through several stages in one pulse. This design avoids both that race and
// the delay elements that would otherwise be needed between latches. The
// register is cut into M = WIDTH/SUB_BITS sub shift registers of SUB_BITS
// data latches plus one temporary latch each, and one shared generator makes
// SUB_BITS+1 non-overlapping delayed pulses per clock cycle, fired in reverse
// order (<T> first, <1> last). Each latch position k of every group shares
// pulse <k>, so only SUB_BITS+1 pulse lines are needed whatever WIDTH is.
// Storage costs WIDTH*(SUB_BITS+1)/SUB_BITS latches (320 for 256 bits).
//
// Interface: clk (system clock), in (serial data input), q[1..WIDTH]
// (q[k] is Q<k>, q[1] the newest bit), shift_out (the temporary latch of
// the last group: the bit shifted out of q[WIDTH] in the last cycle).
// Timing: at every rising clk edge the register shifts by one place; in is
// sampled during CLK_pulse<1>, the last pulse of the sequence, about
// SUB_BITS*(T_DELAY+2*T_INV) after the edge, so in must be stable from
// that point until the pulse ends. All outputs are settled once the pulse
// sequence is over, T_AND+T_BUF+SUB_BITS*(T_DELAY+2*T_INV)+T_DELAY+T_INV
// after the edge (360 ps with the default delays). There is no reset: like
// the latch cell, the register powers up with unknown contents and is
// cleared by shifting WIDTH bits in. The differential input in_b is made by
// an inverter; both are this implementation's choices.
module pulsed_latch_shift_register #(
  parameter int unsigned WIDTH    = plsr_pkg::DEFAULT_WIDTH,
  parameter int unsigned SUB_BITS = plsr_pkg::DEFAULT_SUB_BITS,
  parameter int unsigned T_DELAY  = plsr_pkg::DEFAULT_T_DELAY,
  parameter int unsigned T_INV    = plsr_pkg::DEFAULT_T_INV,
  parameter int unsigned T_AND    = plsr_pkg::DEFAULT_T_AND,
  parameter int unsigned T_BUF    = plsr_pkg::DEFAULT_T_BUF
) (
  input  logic           clk,
  input  logic           in,
  output logic [WIDTH:1] q,
  output logic           shift_out
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned M = WIDTH / SUB_BITS;  // number of sub shift registers

  if (WIDTH % SUB_BITS != 0 || M == 0) begin : g_bad_width
    $error("pulsed_latch_shift_register: WIDTH must be a positive multiple of SUB_BITS");
  end

  logic              clk_pulse_t;
  logic [SUB_BITS:1] clk_pulse;

  pulsed_clock_gen #(
    .SUB_BITS (SUB_BITS),
    .T_DELAY  (T_DELAY),
    .T_INV    (T_INV),
    .T_AND    (T_AND),
    .T_BUF    (T_BUF)
  ) u_pulse_gen (
    .clk         (clk),
    .clk_pulse_t (clk_pulse_t),
    .clk_pulse   (clk_pulse)
  );

  // link[g] / link_b[g] is the serial input of group g+1; link[M] is the
  // temporary latch of the last group.
  logic [M:0] link;
  logic [M:0] link_b;

  assign link[0]   = in;
  assign link_b[0] = ~in;

  for (genvar g = 0; g < M; g++) begin : g_sub
    sub_shift_register #(
      .SUB_BITS (SUB_BITS)
    ) u_sub (
      .d_in        (link[g]),
      .d_in_b      (link_b[g]),
      .clk_pulse_t (clk_pulse_t),
      .clk_pulse   (clk_pulse),
      .q           (q[g*SUB_BITS+1 +: SUB_BITS]),
      .t           (link[g+1]),
      .t_b         (link_b[g+1])
    );
  end

  assign shift_out = link[M];
endmodule
