// 8x8-bit unsigned multiplier, Vedic (Urdhva Tiryagbhyam) structure.
//
// The operands are split into halves, a = {aH, aL} and b = {bH, bL}, of
// 4 bits each. Four 4x4 multipliers (vedic_mul4x4) form the
// vertical and crosswise products
//   pLL = aL*bL,  pHL = aH*bL,  pLH = aL*bH,  pHH = aH*bH      (8 bits each)
// and three 8-bit ripple-carry adders combine them:
//   adder 1: t1, ca1 = pHL + pLH               (the two crosswise products)
//   adder 2: t2, ca2 = t1 + {0, pLL[7:4]}      (add the upper half of pLL)
//   adder 3: s[15:8]  = pHH + {0, cc, t2[7:4]}
// with cc = ca1 | ca2 entering adder 3 at bit 4, which has the same weight
// (2^12) as both carries. The low 4 product bits are pLL[3:0] and the
// next 4 are t2[3:0]. All adders have carry in 0.
//
// The halving, the four sub-multipliers, the three adders and the operand
// bits each adder receives follow the design. The design does not say how
// the two carries ca1 and ca2 are joined; they can never both be 1 (if the
// crosswise sum overflows, its low part is too small for adder 2 to overflow
// again), so an OR gate joins them here, which is this design's choice. For
// the same reason the carry out of adder 3 is always 0 and is left unused.
//
// Interface: a, b (8 bits) in; s (16 bits) out, s = a * b.
// Combinational, no clock.
module vedic_mul8x8 #(
  parameter vm_pkg::logic_style_e STYLE = vm_pkg::STYLE_GDI
) (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] s
);

  localparam int H = 4;

  logic [7:0] p_ll, p_hl, p_lh, p_hh;  // partial products
  logic [7:0] t1, t2;                  // sums of adders 1 and 2
  logic       ca1, ca2, ca3, cc;        // adder carries

  vedic_mul4x4 #(.STYLE(STYLE)) u_mul_ll (.a(a[H-1:0]), .b(b[H-1:0]), .s(p_ll));
  vedic_mul4x4 #(.STYLE(STYLE)) u_mul_hl (.a(a[7:H]), .b(b[H-1:0]), .s(p_hl));
  vedic_mul4x4 #(.STYLE(STYLE)) u_mul_lh (.a(a[H-1:0]), .b(b[7:H]), .s(p_lh));
  vedic_mul4x4 #(.STYLE(STYLE)) u_mul_hh (.a(a[7:H]), .b(b[7:H]), .s(p_hh));

  // Adder 1: the two crosswise products.
  vm_rca #(.WIDTH(8), .STYLE(STYLE)) u_add1 (
    .x(p_hl), .y(p_lh), .cin(1'b0), .sum(t1), .cout(ca1)
  );

  // Adder 2: add the upper half of the low product.
  vm_rca #(.WIDTH(8), .STYLE(STYLE)) u_add2 (
    .x(t1), .y({4'b0000, p_ll[7:H]}), .cin(1'b0), .sum(t2), .cout(ca2)
  );

  // The two carries carry the same weight and are mutually exclusive.
  vm_or2 #(.STYLE(STYLE)) u_join (.a(ca1), .b(ca2), .y(cc));

  // Adder 3: the high product plus everything that spills over into it.
  vm_rca #(.WIDTH(8), .STYLE(STYLE)) u_add3 (
    .x(p_hh), .y({3'b000, cc, t2[7:H]}), .cin(1'b0), .sum(s[15:8]),
    .cout(ca3)
  );

  assign s[H-1:0]    = p_ll[H-1:0];
  assign s[7:H] = t2[H-1:0];

endmodule
