// sub_shift_register_tb: self-checking test of one 4-bit sub shift register.
//
// The testbench makes the five pulses itself, in the order the generator
// fires them (<T>, <4>, <3>, <2>, <1>, 60 ps wide, 10 ps apart), so the
// group is tested on its own. Each cycle a random bit is applied and the
// outputs are compared with a software shift register: q[k] must hold the
// bit applied k-1 cycles earlier, q[1] the bit of this cycle and t the bit
// applied SUB_BITS cycles earlier. A second phase fires the pulses in the
// reverse order (<1> first) and checks that data then runs through the
// whole group in one cycle: the race the firing order exists to prevent.
module sub_shift_register_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned SUB_BITS = 4;
  localparam int unsigned CYCLES   = 200;

  logic              d_in, d_in_b;
  logic              clk_pulse_t;
  logic [SUB_BITS:1] clk_pulse;
  logic [SUB_BITS:1] q;
  logic              t, t_b;
  logic              hist [SUB_BITS+1];  // hist[i]: bit applied i cycles ago
  int                checks = 0;
  int                failures = 0;
  int                t_changes = 0;

  sub_shift_register #(.SUB_BITS(SUB_BITS)) u_dut (
    .d_in(d_in), .d_in_b(d_in_b), .clk_pulse_t(clk_pulse_t), .clk_pulse(clk_pulse),
    .q(q), .t(t), .t_b(t_b)
  );

  assign d_in_b = ~d_in;

  always @(t) t_changes++;

  task automatic fire_t();
    clk_pulse_t = 1'b1; #60; clk_pulse_t = 1'b0; #10;
  endtask

  task automatic fire(int k);
    clk_pulse[k] = 1'b1; #60; clk_pulse[k] = 1'b0; #10;
  endtask

  // One shift cycle in the generator's order.
  task automatic shift_cycle();
    fire_t();
    for (int k = SUB_BITS; k >= 1; k--) fire(k);
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk_pulse_t = 1'b0;
    clk_pulse   = '0;
    d_in        = 1'b0;
    for (int i = 0; i <= SUB_BITS; i++) hist[i] = 1'b0;
    // Fill the group with zeros.
    repeat (SUB_BITS + 1) shift_cycle();
    for (int c = 0; c < CYCLES; c++) begin
      d_in = 1'($urandom_range(1, 0));
      #100;
      shift_cycle();
      for (int i = SUB_BITS; i >= 1; i--) hist[i] = hist[i-1];
      hist[0] = d_in;
      #100;
      for (int k = 1; k <= SUB_BITS; k++) begin
        checks++;
        if (q[k] !== hist[k-1]) begin
          failures++;
          $display("FAIL cycle %0d: q[%0d]=%b expected %b", c, k, q[k], hist[k-1]);
        end
      end
      checks++;
      if (t !== hist[SUB_BITS] || t_b !== ~hist[SUB_BITS]) begin
        failures++;
        $display("FAIL cycle %0d: t=%b t_b=%b expected %b", c, t, t_b, hist[SUB_BITS]);
      end
    end
    checks++;
    if (t_changes == 0) begin
      failures++;
      $display("FAIL: temporary latch never changed");
    end

    // Wrong order: with <1> first the new bit runs through every latch.
    d_in = 1'b0; repeat (SUB_BITS + 1) shift_cycle();
    d_in = 1'b1; #100;
    for (int k = 1; k <= SUB_BITS; k++) fire(k);
    fire_t();
    checks++;
    if (q !== '1 || t !== 1'b1) begin
      failures++;
      $display("FAIL reverse order: q=%b t=%b, expected the input everywhere", q, t);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
