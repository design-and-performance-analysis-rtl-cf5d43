// 4x4-bit unsigned multiplier, Vedic (Urdhva Tiryagbhyam) structure.
//
// The operands are split into halves, a = {aH, aL} and b = {bH, bL}, of
// 2 bits each. Four 2x2 multipliers (vedic_mul2x2) form the
// vertical and crosswise products
//   pLL = aL*bL,  pHL = aH*bL,  pLH = aL*bH,  pHH = aH*bH      (4 bits each)
// and three 4-bit ripple-carry adders combine them:
//   adder 1: t1, ca1 = pHL + pLH               (the two crosswise products)
//   adder 2: t2, ca2 = t1 + {0, pLL[3:2]}      (add the upper half of pLL)
//   adder 3: s[7:4]  = pHH + {0, cc, t2[3:2]}
// with cc = ca1 | ca2 entering adder 3 at bit 2, which has the same weight
// (2^6) as both carries. The low 2 product bits are pLL[1:0] and the
// next 2 are t2[1:0]. All adders have carry in 0.
//
// The halving, the four sub-multipliers, the three adders and the operand
// bits each adder receives follow the design. The design does not say how
// the two carries ca1 and ca2 are joined; they can never both be 1 (if the
// crosswise sum overflows, its low part is too small for adder 2 to overflow
// again), so an OR gate joins them here, which is this design's choice. For
// the same reason the carry out of adder 3 is always 0 and is left unused.
//
// Interface: a, b (4 bits) in; s (8 bits) out, s = a * b.
// Combinational, no clock.
module vedic_mul4x4 #(
  parameter vm_pkg::logic_style_e STYLE = vm_pkg::STYLE_GDI
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] s
);

  localparam int H = 2;

  logic [3:0] p_ll, p_hl, p_lh, p_hh;  // partial products
  logic [3:0] t1, t2;                  // sums of adders 1 and 2
  logic       ca1, ca2, ca3, cc;        // adder carries

  vedic_mul2x2 #(.STYLE(STYLE)) u_mul_ll (.a(a[H-1:0]), .b(b[H-1:0]), .s(p_ll));
  vedic_mul2x2 #(.STYLE(STYLE)) u_mul_hl (.a(a[3:H]), .b(b[H-1:0]), .s(p_hl));
  vedic_mul2x2 #(.STYLE(STYLE)) u_mul_lh (.a(a[H-1:0]), .b(b[3:H]), .s(p_lh));
  vedic_mul2x2 #(.STYLE(STYLE)) u_mul_hh (.a(a[3:H]), .b(b[3:H]), .s(p_hh));

  // Adder 1: the two crosswise products.
  vm_rca #(.WIDTH(4), .STYLE(STYLE)) u_add1 (
    .x(p_hl), .y(p_lh), .cin(1'b0), .sum(t1), .cout(ca1)
  );

  // Adder 2: add the upper half of the low product.
  vm_rca #(.WIDTH(4), .STYLE(STYLE)) u_add2 (
    .x(t1), .y({2'b00, p_ll[3:H]}), .cin(1'b0), .sum(t2), .cout(ca2)
  );

  // The two carries carry the same weight and are mutually exclusive.
  vm_or2 #(.STYLE(STYLE)) u_join (.a(ca1), .b(ca2), .y(cc));

  // Adder 3: the high product plus everything that spills over into it.
  vm_rca #(.WIDTH(4), .STYLE(STYLE)) u_add3 (
    .x(p_hh), .y({1'b0, cc, t2[3:H]}), .cin(1'b0), .sum(s[7:4]),
    .cout(ca3)
  );

  assign s[H-1:0]    = p_ll[H-1:0];
  assign s[3:H] = t2[H-1:0];

endmodule
