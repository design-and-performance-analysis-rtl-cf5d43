// One-bit half adder: sum = a ^ b from an XOR gate, carry = a & b from an
// AND gate. The design names half adders as the adding elements of the 2x2
// multiplier and builds everything from AND and XOR gates; the two-gate
// structure is the usual one and is this design's reading of that.
//
// Interface: a, b in; sum, carry out. Combinational.
module vm_half_adder #(
  parameter vm_pkg::logic_style_e STYLE = vm_pkg::STYLE_GDI
) (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  vm_xor2 #(.STYLE(STYLE)) u_xor (.a(a), .b(b), .y(sum));
  vm_and2 #(.STYLE(STYLE)) u_and (.a(a), .b(b), .y(carry));

endmodule
