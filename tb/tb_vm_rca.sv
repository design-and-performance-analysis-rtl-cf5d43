// Self-checking testbench for vm_rca, the ripple-carry adder.
//
// Checks the 4-bit default width exhaustively (every x, y and cin) in both
// circuit styles, and the 8-bit width used by the 8x8 multiplier
// exhaustively in the GDI style. {cout, sum} must equal x + y + cin. It also
// counts the vectors in which a carry ripples through every stage (x + y all
// ones with cin = 1), the adder's longest path, and fails if none occurred.
// Combinational: 1 ns settling per vector.
module tb_vm_rca;

  logic [3:0] x4, y4, s4_gdi, s4_cmos;
  logic [7:0] x8, y8, s8_gdi;
  logic       cin, co4_gdi, co4_cmos, co8_gdi;
  int         checks = 0;
  int         failures = 0;
  int         full_ripples = 0;

  vm_rca #(.WIDTH(4), .STYLE(vm_pkg::STYLE_GDI))  u_gdi4  (.x(x4), .y(y4), .cin(cin), .sum(s4_gdi),  .cout(co4_gdi));
  vm_rca #(.WIDTH(4), .STYLE(vm_pkg::STYLE_CMOS)) u_cmos4 (.x(x4), .y(y4), .cin(cin), .sum(s4_cmos), .cout(co4_cmos));
  vm_rca #(.WIDTH(8), .STYLE(vm_pkg::STYLE_GDI))  u_gdi8  (.x(x8), .y(y8), .cin(cin), .sum(s8_gdi),  .cout(co8_gdi));

  task automatic expect_val(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x8 = '0;
    y8 = '0;
    for (int v = 0; v < 512; v++) begin
      {cin, x4, y4} = 9'(v);
      #1ns;
      expect_val("4-bit GDI",  int'({co4_gdi, s4_gdi}),   int'(x4) + int'(y4) + int'(cin));
      expect_val("4-bit CMOS", int'({co4_cmos, s4_cmos}), int'(x4) + int'(y4) + int'(cin));
      if (cin && ((x4 ^ y4) == 4'hF)) full_ripples++;
    end
    for (int v = 0; v < 131072; v++) begin
      {cin, x8, y8} = 17'(v);
      #1ns;
      expect_val("8-bit GDI", int'({co8_gdi, s8_gdi}), int'(x8) + int'(y8) + int'(cin));
    end
    if (full_ripples == 0) begin
      failures++;
      $display("FAIL no full-length carry ripple was exercised");
    end
    $display("full-length carry ripples (4-bit): %0d", full_ripples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
