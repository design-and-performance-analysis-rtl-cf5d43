// 2x2-bit unsigned multiplier by the Urdhva Tiryagbhyam ("vertically and
// crosswise") method.
//
// With a = a1a0 and b = b1b0:
//   s0      = a0 b0                 vertical product of the low bits
//   c1 s1   = a1 b0 + a0 b1         crosswise products, first half adder
//   c2 s2   = c1 + a1 b1            vertical product of the high bits plus
//                                   the crosswise carry, second half adder
// and the product is s = {c2, s2, s1, s0}. Four AND gates form the partial
// products and two half adders add them, as in the design.
//
// Interface: a, b (2 bits) in; s (4 bits) out, s = a * b. Combinational;
// the longest path is an AND gate and two half adders.
module vedic_mul2x2 #(
  parameter vm_pkg::logic_style_e STYLE = vm_pkg::STYLE_GDI
) (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] s
);

  logic a0b0, a1b0, a0b1, a1b1;  // partial products
  logic c1;                      // carry of the crosswise sum

  vm_and2 #(.STYLE(STYLE)) u_pp00 (.a(a[0]), .b(b[0]), .y(a0b0));
  vm_and2 #(.STYLE(STYLE)) u_pp10 (.a(a[1]), .b(b[0]), .y(a1b0));
  vm_and2 #(.STYLE(STYLE)) u_pp01 (.a(a[0]), .b(b[1]), .y(a0b1));
  vm_and2 #(.STYLE(STYLE)) u_pp11 (.a(a[1]), .b(b[1]), .y(a1b1));

  vm_half_adder #(.STYLE(STYLE)) u_ha_cross (
    .a(a0b1), .b(a1b0), .sum(s[1]), .carry(c1)
  );
  vm_half_adder #(.STYLE(STYLE)) u_ha_high (
    .a(a1b1), .b(c1), .sum(s[2]), .carry(s[3])
  );

  assign s[0] = a0b0;

endmodule
