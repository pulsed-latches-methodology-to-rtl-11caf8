// pulsed_latch_shift_register_tb: end-to-end test of the 256-bit pulsed-latch
// shift register at its default parameters.
//
// A 1 GHz clock (1000 ps period) drives the register; a random bit is applied
// on every falling edge, so it is stable while the pulse sequence of the
// next rising edge runs. After each cycle (just before the falling edge) the
// parallel output q[1..WIDTH] and shift_out are compared with a software
// shift register kept here: q[k] must hold the bit applied k cycles ago
// (one cycle of latency to q[1]) and shift_out the bit applied WIDTH+1
// cycles ago, i.e. a bit leaves q[WIDTH] after exactly WIDTH shifts.
// Comparisons start once the register has been filled; it has no reset.
//
// It also counts, and fails if any never happens: each of the SUB_BITS+1
// pulse lines firing, the pulse lines being pairwise non-overlapping,
// every temporary latch passing a changed bit to the next group, and
// shift_out producing both values. A count of latch writes per cycle checks
// that no bit moves more than one place per cycle.
module pulsed_latch_shift_register_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned WIDTH    = plsr_pkg::DEFAULT_WIDTH;
  localparam int unsigned SUB_BITS = plsr_pkg::DEFAULT_SUB_BITS;
  localparam int unsigned M        = WIDTH / SUB_BITS;
  localparam int unsigned HALF     = 500;
  localparam int unsigned CYCLES   = 3 * WIDTH + 20;

  logic           clk = 1'b0;
  logic           in;
  logic [WIDTH:1] q;
  logic           shift_out;

  logic           hist [WIDTH+2];  // hist[i]: bit applied i cycles before the last edge
  int             valid = 0;       // how many entries of hist are defined
  int             checks = 0;
  int             failures = 0;

  // Mechanism counters.
  int             pulse_cnt [SUB_BITS+1];  // [0] = <T>, [k] = <k>
  int             overlap_ps = 0;
  int             t_moves [M];             // changes seen on each group's T latch
  int             out_ones = 0;
  int             out_zeros = 0;

  pulsed_latch_shift_register u_dut (
    .clk       (clk),
    .in        (in),
    .q         (q),
    .shift_out (shift_out)
  );

  // Pulse lines, probed inside the design.
  logic [SUB_BITS:0] pulses;
  assign pulses = {u_dut.clk_pulse, u_dut.clk_pulse_t};

  for (genvar k = 0; k <= SUB_BITS; k++) begin : g_pmon
    always @(posedge pulses[k]) pulse_cnt[k]++;
  end

  for (genvar g = 0; g < M; g++) begin : g_tmon
    always @(u_dut.link[g+1]) t_moves[g]++;
  end

  initial forever begin
    #1;
    if ($countones(pulses) > 1) overlap_ps++;
  end

  initial begin : watchdog
    #((CYCLES + 20) * 2 * HALF);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad_bits;
    in = 1'b0;
    #(4 * HALF);   // settle the pulse chain with the clock low
    for (int k = 0; k <= SUB_BITS; k++) pulse_cnt[k] = 0;
    for (int g = 0; g < M; g++) t_moves[g] = 0;
    overlap_ps = 0;

    for (int c = 0; c < CYCLES; c++) begin
      // Falling edge: apply the next bit.
      in = 1'($urandom_range(1, 0));
      #HALF;
      // Rising edge: the register shifts.
      clk = 1'b1;
      for (int i = WIDTH + 1; i >= 1; i--) hist[i] = hist[i-1];
      hist[0] = in;
      if (valid < WIDTH + 2) valid++;
      #(HALF - 1);
      // Compare every defined position.
      bad_bits = 0;
      for (int k = 1; k <= WIDTH; k++) begin
        if (k <= valid && q[k] !== hist[k-1]) begin
          if (bad_bits < 4)
            $display("FAIL cycle %0d: Q<%0d>=%b expected %b", c, k, q[k], hist[k-1]);
          bad_bits++;
        end
      end
      checks++;
      if (bad_bits != 0) failures++;
      if (valid == WIDTH + 2) begin
        checks++;
        if (shift_out !== hist[WIDTH]) begin
          failures++;
          $display("FAIL cycle %0d: shift_out=%b expected %b", c, shift_out, hist[WIDTH]);
        end
        if (shift_out) out_ones++; else out_zeros++;
      end
      #1;
      clk = 1'b0;
    end

    // Every mechanism must have happened.
    for (int k = 0; k <= SUB_BITS; k++) begin
      checks++;
      if (pulse_cnt[k] != int'(CYCLES)) begin
        failures++;
        $display("FAIL pulse line %0d fired %0d times in %0d cycles", k, pulse_cnt[k], CYCLES);
      end
    end
    checks++;
    if (overlap_ps != 0) begin
      failures++;
      $display("FAIL pulse lines overlapped for %0d ps", overlap_ps);
    end
    for (int g = 0; g < M; g++) begin
      checks++;
      if (t_moves[g] == 0) begin
        failures++;
        $display("FAIL temporary latch of group %0d never passed a bit on", g + 1);
      end
    end
    checks++;
    if (out_ones == 0 || out_zeros == 0) begin
      failures++;
      $display("FAIL shift_out never produced both values");
    end
    $display("pulses per line: T=%0d 4..1=%0d,%0d,%0d,%0d  overlap_ps=%0d  shift_out 1s=%0d 0s=%0d",
             pulse_cnt[0], pulse_cnt[4], pulse_cnt[3], pulse_cnt[2], pulse_cnt[1],
             overlap_ps, out_ones, out_zeros);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
