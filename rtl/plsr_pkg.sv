// plsr_pkg: constants shared by the pulsed-latch shift register.
//
// The register length (256 bits) and the 4-bit grouping of the sub shift
// registers are the design's own figures. The gate delays of the delayed
// pulsed clock generator are not specified for the 90 nm cells the design
// targets; the values below are this implementation's choice, picked so that
// every pulse is wider than a latch needs and consecutive pulses are
// separated by one inverter delay. All times are in picoseconds.
package plsr_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  // Register organisation.
  localparam int unsigned DEFAULT_WIDTH    = 256;  // bits Q<1>..Q<256>
  localparam int unsigned DEFAULT_SUB_BITS = 4;    // data latches per sub shift register

  // Clock-pulse circuit timing (ps).
  localparam int unsigned DEFAULT_T_DELAY = 50;    // delay element
  localparam int unsigned DEFAULT_T_INV   = 10;    // each inverter
  localparam int unsigned DEFAULT_T_AND   = 10;    // pulse AND gate
  localparam int unsigned DEFAULT_T_BUF   = 10;    // clock buffer driving one pulse line

  // Width of one pulse and the skew from one stage's clock to the next.
  function automatic int unsigned pulse_width(int unsigned t_delay, int unsigned t_inv);
    return t_delay + t_inv;
  endfunction

  function automatic int unsigned stage_skew(int unsigned t_delay, int unsigned t_inv);
    return t_delay + 2 * t_inv;
  endfunction
endpackage
