// pulsed_latch_shift_register_cfg_tb: the shift register in a non-default
// configuration, 12 bits in four 3-bit groups (four pulse lines), with a
// test of when the serial input is sampled.
//
// The input is captured during CLK_pulse<1>, the last pulse of the
// sequence, not at the clock edge. Here the testbench changes `in` 100 ps
// after each rising edge, before CLK_pulse<1> starts
// (T_AND+T_BUF+SUB_BITS*(T_DELAY+2*T_INV) = 230 ps), and checks that the
// new value, not the old one, is what enters Q<1> in that same cycle. The
// rest of the register is compared with a software shift register every
// cycle, as in the full-size test.
module pulsed_latch_shift_register_cfg_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned WIDTH    = 12;
  localparam int unsigned SUB_BITS = 3;
  localparam int unsigned HALF     = 500;
  localparam int unsigned CYCLES   = 200;
  localparam int unsigned T_LATE   = 100;  // input change after the edge, in ps

  logic           clk = 1'b0;
  logic           in;
  logic [WIDTH:1] q;
  logic           shift_out;
  logic           hist [WIDTH+2];
  int             valid = 0;
  int             checks = 0;
  int             failures = 0;
  int             late_changes = 0;

  pulsed_latch_shift_register #(
    .WIDTH    (WIDTH),
    .SUB_BITS (SUB_BITS)
  ) u_dut (
    .clk       (clk),
    .in        (in),
    .q         (q),
    .shift_out (shift_out)
  );

  initial begin : watchdog
    #((CYCLES + 20) * 2 * HALF);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic old_in;
    in = 1'b0;
    #(4 * HALF);
    for (int c = 0; c < CYCLES; c++) begin
      old_in = in;
      clk = 1'b1;
      // Change the input after the edge but before the last pulse.
      #T_LATE;
      in = 1'($urandom_range(1, 0));
      if (in != old_in) late_changes++;
      for (int i = WIDTH + 1; i >= 1; i--) hist[i] = hist[i-1];
      hist[0] = in;
      if (valid < WIDTH + 2) valid++;
      #(HALF - T_LATE);
      clk = 1'b0;
      #(HALF - 1);
      for (int k = 1; k <= WIDTH; k++) begin
        if (k <= valid) begin
          checks++;
          if (q[k] !== hist[k-1]) begin
            failures++;
            $display("FAIL cycle %0d: Q<%0d>=%b expected %b", c, k, q[k], hist[k-1]);
          end
        end
      end
      if (valid == WIDTH + 2) begin
        checks++;
        if (shift_out !== hist[WIDTH]) begin
          failures++;
          $display("FAIL cycle %0d: shift_out=%b expected %b", c, shift_out, hist[WIDTH]);
        end
      end
      #1;
    end
    checks++;
    if (late_changes == 0) begin
      failures++;
      $display("FAIL input never changed after an edge");
    end
    $display("late input changes captured: %0d", late_changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
