// clock_pulse_circuit_tb: self-checking test of one clock-pulse stage.
//
// Applies a 1 GHz clock and measures, for every rising edge, when the pulse
// rises and falls and when the delayed clock clk_out rises. The expected
// times are computed here from the gate delays passed to the stage:
// pulse from T_AND+T_BUF to T_DELAY+T_INV+T_AND+T_BUF, clk_out at
// T_DELAY+2*T_INV. A falling clock edge must produce no pulse.
module clock_pulse_circuit_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned T_DELAY = 50;
  localparam int unsigned T_INV   = 10;
  localparam int unsigned T_AND   = 10;
  localparam int unsigned T_BUF   = 10;
  localparam int unsigned HALF    = 500;
  localparam int unsigned CYCLES  = 40;

  logic clk = 1'b0;
  logic pulse, clk_out;
  int   checks = 0;
  int   failures = 0;
  int   pulses = 0;
  time  t_edge, t_rise, t_fall, t_out;

  clock_pulse_circuit #(
    .T_DELAY(T_DELAY), .T_INV(T_INV), .T_AND(T_AND), .T_BUF(T_BUF)
  ) u_dut (.clk_in(clk), .pulse(pulse), .clk_out(clk_out));

  task automatic expect_time(string what, time got, time want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: %0t ps after the edge, expected %0t", what, got, want);
    end
  endtask

  initial begin : watchdog
    #((CYCLES + 10) * 2 * HALF);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge pulse) pulses++;

  initial begin
    // Let the internal nodes settle with the clock low.
    #(4 * HALF);
    for (int c = 0; c < CYCLES; c++) begin
      clk = 1'b1;
      t_edge = $time;
      fork
        begin @(posedge pulse); t_rise = $time; @(negedge pulse); t_fall = $time; end
        begin @(posedge clk_out); t_out = $time; end
      join_none
      #HALF;
      expect_time("pulse rise", t_rise - t_edge, time'(T_AND + T_BUF));
      expect_time("pulse fall", t_fall - t_edge, time'(T_DELAY + T_INV + T_AND + T_BUF));
      expect_time("clk_out rise", t_out - t_edge, time'(T_DELAY + 2 * T_INV));
      disable fork;
      clk = 1'b0;
      #HALF;
      // No pulse on the falling edge, and the delayed clock is low again.
      checks++;
      if (pulses != c + 1 || clk_out !== 1'b0) begin
        failures++;
        $display("FAIL cycle %0d: %0d pulses seen, clk_out=%b", c, pulses, clk_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
