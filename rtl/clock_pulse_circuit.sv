// clock_pulse_circuit: one stage of the delayed pulsed clock generator.
// Behavioural model: its function is made of gate delays, so it is written
// with delayed continuous assignments and is meant for simulation, not for
// synthesis (a synthesis tool drops the delays and the pulse with them).
//
// Structure, as in the stage of the generator: the incoming clock clk_in
// goes through a delay element and an inverter to node clk_dly_n; clk_in
// AND clk_dly_n, through a clock buffer, is the pulse; a second inverter on
// clk_dly_n gives clk_out, the delayed clock for the next stage.
//
// Timing, for a rising edge of clk_in at time 0:
//   pulse    high from T_AND+T_BUF to T_DELAY+T_INV+T_AND+T_BUF
//            (width T_DELAY+T_INV)
//   clk_out  rises at T_DELAY+2*T_INV
// so the next stage's pulse starts one inverter delay after this one ends
// and the two never overlap. A falling edge of clk_in makes no pulse. The
// clock high time must exceed T_DELAY+T_INV for a full-width pulse.
// The delay values are this implementation's choice (see plsr_pkg).
module clock_pulse_circuit #(
  parameter int unsigned T_DELAY = plsr_pkg::DEFAULT_T_DELAY,
  parameter int unsigned T_INV   = plsr_pkg::DEFAULT_T_INV,
  parameter int unsigned T_AND   = plsr_pkg::DEFAULT_T_AND,
  parameter int unsigned T_BUF   = plsr_pkg::DEFAULT_T_BUF
) (
  input  logic clk_in,
  output logic pulse,
  output logic clk_out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic clk_dly;    // after the delay element
  logic clk_dly_n;  // after the first inverter, feeds the AND gate
  logic pulse_raw;  // AND gate output, before the clock buffer

  assign #(T_DELAY) clk_dly   = clk_in;
  assign #(T_INV)   clk_dly_n = ~clk_dly;
  assign #(T_INV)   clk_out   = ~clk_dly_n;
  assign #(T_AND)   pulse_raw = clk_in & clk_dly_n;
  assign #(T_BUF)   pulse     = pulse_raw;
endmodule
