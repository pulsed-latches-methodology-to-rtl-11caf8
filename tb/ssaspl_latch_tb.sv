// ssaspl_latch_tb: self-checking test of the SSASPL pulsed latch.
//
// Drives random data and random pulses and compares q / q_b with a reference
// worked out here: while the pulse is high q must follow d (including data
// changes inside the pulse, the latch being transparent), while it is low q
// must keep the value it had when the pulse fell.
module ssaspl_latch_tb;
  timeunit 1ps;
  timeprecision 1ps;

  logic pulse, d, d_b, q, q_b;
  int   checks = 0;
  int   failures = 0;
  logic expected;
  int   opened = 0;
  int   held = 0;

  ssaspl_latch u_dut (.pulse(pulse), .d(d), .d_b(d_b), .q(q), .q_b(q_b));

  task automatic check(string what);
    checks++;
    if (q !== expected || q_b !== ~expected) begin
      failures++;
      $display("FAIL %s at %0t: q=%b q_b=%b expected %b", what, $time, q, q_b, expected);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pulse = 1'b0;
    d = 1'b0; d_b = 1'b1;
    // Initialise through one pulse.
    #10 pulse = 1'b1;
    #10 expected = 1'b0; check("init");
    pulse = 1'b0;
    for (int i = 0; i < 400; i++) begin
      logic nd;
      nd = 1'($urandom_range(1, 0));
      #10 d = nd; d_b = ~nd;
      #10;
      if ($urandom_range(1, 0) == 1) begin
        // Open the latch: q follows d, also when d changes mid-pulse.
        pulse = 1'b1;
        #10 expected = d; check("transparent"); opened++;
        nd = 1'($urandom_range(1, 0));
        d = nd; d_b = ~nd;
        #10 expected = nd; check("transparent change");
        pulse = 1'b0;
        #10 check("closed after pulse");
      end else begin
        // Closed: q must not follow d.
        d = ~d; d_b = ~d_b;
        #10 check("hold"); held++;
      end
    end
    if (opened == 0 || held == 0) begin
      failures++;
      $display("FAIL: open or hold case never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
