// pulsed_clock_gen: delayed pulsed clock generator shared by all sub shift
// registers.
//
// A chain of SUB_BITS+1 clock-pulse circuits. The first stage takes CLK and
// produces CLK_pulse<T> (the pulse of the temporary latches); each further
// stage takes the delayed clock of the stage before it, so the pulses follow
// one another after every rising CLK edge in the order
//   CLK_pulse<T>, CLK_pulse<SUB_BITS>, ..., CLK_pulse<2>, CLK_pulse<1>
// without overlapping. Latches at the far end of each sub shift register are
// thus written first, and every latch reads a neighbour that is not changing.
// Stage order and the gate structure of a stage follow the design; the
// number of stages is SUB_BITS+1 (five for 4-bit sub shift registers).
//
// Interface: clk (the system clock), clk_pulse_t (CLK_pulse<T>),
// clk_pulse[k] for k = 1..SUB_BITS (CLK_pulse<k>).
// Timing: pulse j of the sequence (j = 0 for <T>, j = SUB_BITS+1-k for <k>)
// starts j*(T_DELAY+2*T_INV)+T_AND+T_BUF after the CLK rising edge and lasts
// T_DELAY+T_INV. The whole sequence must end before the next rising edge,
// and CLK must stay high at least T_DELAY+T_INV.
// The delays live in the clock_pulse_circuit stages, which are behavioural;
// this module is only their interconnection.
module pulsed_clock_gen #(
  parameter int unsigned SUB_BITS = plsr_pkg::DEFAULT_SUB_BITS,
  parameter int unsigned T_DELAY  = plsr_pkg::DEFAULT_T_DELAY,
  parameter int unsigned T_INV    = plsr_pkg::DEFAULT_T_INV,
  parameter int unsigned T_AND    = plsr_pkg::DEFAULT_T_AND,
  parameter int unsigned T_BUF    = plsr_pkg::DEFAULT_T_BUF
) (
  input  logic                clk,
  output logic                clk_pulse_t,
  output logic [SUB_BITS:1]   clk_pulse
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned STAGES = SUB_BITS + 1;

  // stage_clk[j] is the clock entering stage j; stage_pulse[j] its pulse.
  logic [STAGES:0] stage_clk;
  logic [STAGES-1:0] stage_pulse;

  assign stage_clk[0] = clk;

  for (genvar j = 0; j < STAGES; j++) begin : g_stage
    clock_pulse_circuit #(
      .T_DELAY (T_DELAY),
      .T_INV   (T_INV),
      .T_AND   (T_AND),
      .T_BUF   (T_BUF)
    ) u_stage (
      .clk_in  (stage_clk[j]),
      .pulse   (stage_pulse[j]),
      .clk_out (stage_clk[j+1])
    );
  end

  // Stage 0 drives the temporary latches; stage j >= 1 drives data latch
  // SUB_BITS+1-j, so the last stage drives the first latch.
  assign clk_pulse_t = stage_pulse[0];
  for (genvar k = 1; k <= SUB_BITS; k++) begin : g_map
    assign clk_pulse[k] = stage_pulse[SUB_BITS + 1 - k];
  end
endmodule
