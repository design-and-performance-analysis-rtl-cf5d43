// One-bit full adder from two XOR gates, two AND gates and one OR gate.
//
//   p     = a ^ b
//   sum   = p ^ c
//   carry = (a & b) | (p & c)
//
// The design builds its full adder from XOR, AND and OR gates, with the sum
// from two cascaded XORs and the carry from a separate group of three gates;
// reusing the propagate term p = a ^ b in the carry is this design's choice.
//
// Interface: a, b, c (carry in) in; sum, carry out. Combinational.
module vm_full_adder #(
  parameter vm_pkg::logic_style_e STYLE = vm_pkg::STYLE_GDI
) (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  logic p, g, t;

  vm_xor2 #(.STYLE(STYLE)) u_xor0 (.a(a), .b(b), .y(p));
  vm_xor2 #(.STYLE(STYLE)) u_xor1 (.a(p), .b(c), .y(sum));
  vm_and2 #(.STYLE(STYLE)) u_and0 (.a(a), .b(b), .y(g));
  vm_and2 #(.STYLE(STYLE)) u_and1 (.a(p), .b(c), .y(t));
  vm_or2  #(.STYLE(STYLE)) u_or   (.a(g), .b(t), .y(carry));

endmodule
