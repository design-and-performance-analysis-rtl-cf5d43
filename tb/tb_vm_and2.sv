// Self-checking testbench for vm_and2, the two-input AND gate.
//
// Instantiates the gate in both circuit styles (GDI and static CMOS) and
// applies all four input combinations, comparing each output with the
// AND truth table computed here. Combinational: 1 ns settling per vector.
module tb_vm_and2;

  logic a, b, y_gdi, y_cmos;
  int   checks = 0;
  int   failures = 0;

  vm_and2 #(.STYLE(vm_pkg::STYLE_GDI))  u_gdi  (.a(a), .b(b), .y(y_gdi));
  vm_and2 #(.STYLE(vm_pkg::STYLE_CMOS)) u_cmos (.a(a), .b(b), .y(y_cmos));

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b got %0b expected %0b", what, a, b, got, exp);
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
    logic exp;
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1ns;
      exp = (a && b);
      expect_bit("GDI",  y_gdi,  exp);
      expect_bit("CMOS", y_cmos, exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
