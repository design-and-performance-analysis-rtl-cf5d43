// Self-checking testbench for gdi_cell.
//
// Wires six cells into the six input configurations of the GDI function
// table (F1, F2, OR, AND, MUX, NOT) and drives every combination of the
// three variables A, B, C. Each configured cell is compared with the
// Boolean function the table assigns to it, written out here as an
// expression of A, B and C. Purely combinational: inputs settle for 1 ns.
module tb_gdi_cell;

  logic a, b, c;
  logic f1, f2, f_or, f_and, f_mux, f_not;
  int   checks = 0;
  int   failures = 0;

  //                 G       P       N
  gdi_cell u_f1  (.g(a), .p(b),    .n(1'b0), .d(f1));
  gdi_cell u_f2  (.g(a), .p(1'b1), .n(b),    .d(f2));
  gdi_cell u_or  (.g(a), .p(b),    .n(1'b1), .d(f_or));
  gdi_cell u_and (.g(a), .p(1'b0), .n(b),    .d(f_and));
  gdi_cell u_mux (.g(a), .p(b),    .n(c),    .d(f_mux));
  gdi_cell u_not (.g(a), .p(1'b1), .n(1'b0), .d(f_not));

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b c=%0b got %0b expected %0b", what, a, b, c, got, exp);
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
      expect_bit("F1",  f1,    !a && b);
      expect_bit("F2",  f2,    !a || b);
      expect_bit("OR",  f_or,  a || b);
      expect_bit("AND", f_and, a && b);
      expect_bit("MUX", f_mux, (!a && b) || (a && c));
      expect_bit("NOT", f_not, !a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
