// Self-checking testbench for vm_full_adder.
//
// Both circuit styles, all eight input combinations; {carry, sum} must equal
// the arithmetic sum a + b + c. Combinational: 1 ns settling per vector.
module tb_vm_full_adder;

  logic a, b, c;
  logic s_gdi, c_gdi, s_cmos, c_cmos;
  int   checks = 0;
  int   failures = 0;

  vm_full_adder #(.STYLE(vm_pkg::STYLE_GDI))  u_gdi  (.a(a), .b(b), .c(c), .sum(s_gdi),  .carry(c_gdi));
  vm_full_adder #(.STYLE(vm_pkg::STYLE_CMOS)) u_cmos (.a(a), .b(b), .c(c), .sum(s_cmos), .carry(c_cmos));

  task automatic expect_val(string what, logic [1:0] got, logic [1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b c=%0b got %0d expected %0d", what, a, b, c, got, exp);
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
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1ns;
      expect_val("GDI",  {c_gdi, s_gdi},   2'(int'(a) + int'(b) + int'(c)));
      expect_val("CMOS", {c_cmos, s_cmos}, 2'(int'(a) + int'(b) + int'(c)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
