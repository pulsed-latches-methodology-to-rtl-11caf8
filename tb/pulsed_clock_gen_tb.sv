// pulsed_clock_gen_tb: self-checking test of the delayed pulsed clock
// generator with 4-bit sub shift registers (five pulse lines).
//
// For every rising clock edge it records when each pulse line rises and
// falls and checks, against times computed here from the gate delays:
//   - the firing order <T>, <4>, <3>, <2>, <1>;
//   - the start of pulse j of that order at j*(T_DELAY+2*T_INV)+T_AND+T_BUF
//     and its width T_DELAY+T_INV;
//   - that no two pulse lines are ever high together (sampled every ps);
//   - exactly one pulse per line per cycle, none after the falling edge.
module pulsed_clock_gen_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned SUB_BITS = 4;
  localparam int unsigned N        = SUB_BITS + 1;
  localparam int unsigned T_DELAY  = 50;
  localparam int unsigned T_INV    = 10;
  localparam int unsigned T_AND    = 10;
  localparam int unsigned T_BUF    = 10;
  localparam int unsigned HALF     = 500;
  localparam int unsigned CYCLES   = 30;

  logic              clk = 1'b0;
  logic              clk_pulse_t;
  logic [SUB_BITS:1] clk_pulse;
  logic [N-1:0]      seq;        // seq[j]: j-th pulse of the firing order
  int                checks = 0;
  int                failures = 0;
  int                overlaps = 0;
  int                rise_cnt [N];
  time               t_rise   [N];
  time               t_fall   [N];
  time               t_edge;

  pulsed_clock_gen #(
    .SUB_BITS(SUB_BITS), .T_DELAY(T_DELAY), .T_INV(T_INV), .T_AND(T_AND), .T_BUF(T_BUF)
  ) u_dut (.clk(clk), .clk_pulse_t(clk_pulse_t), .clk_pulse(clk_pulse));

  // Firing order expected: <T> first, then <SUB_BITS> down to <1>.
  assign seq[0] = clk_pulse_t;
  for (genvar j = 1; j < N; j++) begin : g_seq
    assign seq[j] = clk_pulse[N - j];
  end

  for (genvar j = 0; j < N; j++) begin : g_mon
    always @(posedge seq[j]) begin t_rise[j] = $time; rise_cnt[j]++; end
    always @(negedge seq[j]) t_fall[j] = $time;
  end

  // Non-overlap: sample the lines every picosecond.
  initial forever begin
    #1;
    if ($countones(seq) > 1) overlaps++;
  end

  initial begin : watchdog
    #((CYCLES + 10) * 2 * HALF);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Let the chain settle with the clock low, then start counting.
    #(4 * HALF);
    for (int j = 0; j < N; j++) rise_cnt[j] = 0;
    overlaps = 0;
    for (int c = 0; c < CYCLES; c++) begin
      clk = 1'b1;
      t_edge = $time;
      #HALF;
      for (int j = 0; j < N; j++) begin
        time want_rise;
        want_rise = time'(j * (T_DELAY + 2 * T_INV) + T_AND + T_BUF);
        checks++;
        if (t_rise[j] - t_edge != want_rise ||
            t_fall[j] - t_rise[j] != time'(T_DELAY + T_INV) ||
            rise_cnt[j] != c + 1) begin
          failures++;
          $display("FAIL cycle %0d pulse %0d: rise +%0t (want +%0t) width %0t (want %0d) count %0d",
                   c, j, t_rise[j] - t_edge, want_rise, t_fall[j] - t_rise[j],
                   T_DELAY + T_INV, rise_cnt[j]);
        end
      end
      clk = 1'b0;
      #HALF;
      checks++;
      if (rise_cnt[0] != c + 1) begin
        failures++;
        $display("FAIL cycle %0d: pulse after falling edge", c);
      end
    end
    checks++;
    if (overlaps != 0) begin
      failures++;
      $display("FAIL %0d ps with overlapping pulses", overlaps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
