// End-to-end testbench for the complete 8x8 Vedic multiplier, vedic_mul8x8,
// at its default parameters (GDI circuit style).
//
// Applies all 65536 operand pairs and compares each 16-bit product with
// a * b computed here.
// It also recomputes, from the operand halves alone, the internal results
// of the three ripple-carry adders (the crosswise sum t1 with its carry ca1,
// the second sum t2 with its carry ca2, and the joined carry cc) and checks
// them inside the design. Every carry case is counted: ca1 alone, ca2 alone
// and neither must each occur, and ca1 and ca2 must never occur together
// (the property that lets one gate join them).
// Combinational: 1 ns settling per vector.
module tb_vedic_mul8x8;

  logic [7:0] a, b;
  logic [15:0] s_dut;
  int checks = 0;
  int failures = 0;
  int n_ca1 = 0, n_ca2 = 0, n_none = 0, n_both = 0;

  vedic_mul8x8 u_dut (.a(a), .b(b), .s(s_dut));

  task automatic expect_val(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: a=%0d b=%0d got %0d expected %0d", what, a, b, got, exp);
    end
  endtask

  initial begin : watchdog
    #131072ns;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int al, ah, bl, bh, exp_p, xsum, t1, t2;
    bit e_ca1, e_ca2;
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      #1ns;
      al    = int'(a) & 15;
      ah    = int'(a) >> 4;
      bl    = int'(b) & 15;
      bh    = int'(b) >> 4;
      exp_p = int'(a) * int'(b);
      xsum  = ah * bl + al * bh;          // the two crosswise products
      e_ca1 = xsum >= 256;
      t1    = xsum % 256;
      t2    = t1 + ((al * bl) >> 4);     // plus the upper half of aL*bL
      e_ca2 = t2 >= 256;
      t2    = t2 % 256;
      expect_val("product", int'(s_dut), exp_p);
      expect_val("adder 1 sum",   int'(u_dut.t1),  t1);
      expect_val("adder 1 carry", int'(u_dut.ca1), int'(e_ca1));
      expect_val("adder 2 sum",   int'(u_dut.t2),  t2);
      expect_val("adder 2 carry", int'(u_dut.ca2), int'(e_ca2));
      expect_val("joined carry",  int'(u_dut.cc),  int'(e_ca1 | e_ca2));
      if (e_ca1 && e_ca2) n_both++;
      else if (e_ca1)     n_ca1++;
      else if (e_ca2)     n_ca2++;
      else                n_none++;
    end
    $display("carry cases: ca1 only %0d, ca2 only %0d, neither %0d, both %0d",
             n_ca1, n_ca2, n_none, n_both);
    if (n_ca1 == 0)  begin failures++; $display("FAIL carry ca1 never occurred"); end
    if (n_ca2 == 0)  begin failures++; $display("FAIL carry ca2 never occurred"); end
    if (n_none == 0) begin failures++; $display("FAIL carry-free case never occurred"); end
    if (n_both != 0) begin failures++; $display("FAIL ca1 and ca2 occurred together"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
