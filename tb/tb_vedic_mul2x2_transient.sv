// Transient-style testbench for the 2x2 Vedic multiplier, vedic_mul2x2.
//
// The multiplier's reference waveforms come from driving its four inputs
// with square waves, 0 to 1, starting after a 100 ps delay, with pulse
// widths of 10 ns and 20 ns (periods 20 ns and 40 ns). This bench does the
// same in time rather than as a loop: b0, a0, b1 and a1 toggle every 10, 20,
// 40 and 80 ns, so that in 160 ns every one of the sixteen operand pairs is
// held for 10 ns. (The 40 ns and 80 ns waves, and which wave drives which
// input, are this bench's choice, made so that every pair occurs.)
// A monitor samples the product 5 ns after each input change and compares
// it with a * b; it also counts the distinct pairs seen and fails if any of
// the sixteen is missing. The design has no clock: the product must be
// valid within the 5 ns sampling offset, with no cycle latency.
module tb_vedic_mul2x2_transient;

  logic [1:0]  a, b;
  logic [3:0]  s;
  logic [15:0] seen;
  int          checks = 0;
  int          failures = 0;

  vedic_mul2x2 u_dut (.a(a), .b(b), .s(s));

  // Square-wave sources, 100 ps start delay.
  initial begin
    {a, b} = '0;
    seen   = '0;
    #100ps;
    fork
      forever #10ns b[0] = ~b[0];
      forever #20ns a[0] = ~a[0];
      forever #40ns b[1] = ~b[1];
      forever #80ns a[1] = ~a[1];
    join_none
  end

  initial begin : watchdog
    #1us;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5100ps;  // middle of the first 10 ns interval
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (int'(s) != int'(a) * int'(b)) begin
        failures++;
        $display("FAIL t=%0t a=%0d b=%0d s=%0d expected %0d", $time, a, b, s, int'(a) * int'(b));
      end
      seen[{a, b}] = 1'b1;
      #10ns;
    end
    checks++;
    if (seen != 16'hFFFF) begin
      failures++;
      $display("FAIL operand pairs not exercised: %b", ~seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
