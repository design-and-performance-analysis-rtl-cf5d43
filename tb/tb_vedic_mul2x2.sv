// Self-checking testbench for vedic_mul2x2.
//
// All sixteen operand pairs in both circuit styles; the product must equal
// a * b computed here. It also checks, through the internal carry c1 of the
// crosswise half adder, that the crosswise sum a1b0 + a0b1 overflows exactly
// when expected, and that this case occurred at least once.
// Combinational: 1 ns settling per vector.
module tb_vedic_mul2x2;

  logic [1:0] a, b;
  logic [3:0] s_gdi, s_cmos;
  int         checks = 0;
  int         failures = 0;
  int         cross_carries = 0;

  vedic_mul2x2 #(.STYLE(vm_pkg::STYLE_GDI))  u_gdi  (.a(a), .b(b), .s(s_gdi));
  vedic_mul2x2 #(.STYLE(vm_pkg::STYLE_CMOS)) u_cmos (.a(a), .b(b), .s(s_cmos));

  task automatic expect_val(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d got %0d expected %0d", what, a, b, got, exp);
    end
  endtask

  initial begin : watchdog
    #10us;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xsum;
    for (int v = 0; v < 16; v++) begin
      {a, b} = 4'(v);
      #1ns;
      expect_val("GDI product",  int'(s_gdi),  int'(a) * int'(b));
      expect_val("CMOS product", int'(s_cmos), int'(a) * int'(b));
      xsum = int'(a[1] & b[0]) + int'(a[0] & b[1]);
      expect_val("crosswise carry", int'(u_gdi.c1), xsum / 2);
      if (xsum == 2) cross_carries++;
    end
    if (cross_carries == 0) begin
      failures++;
      $display("FAIL the crosswise carry never occurred");
    end
    $display("crosswise carries: %0d", cross_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
