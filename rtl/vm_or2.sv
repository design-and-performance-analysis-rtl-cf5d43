// Two-input OR gate in either circuit style.
//
// STYLE_CMOS: the static CMOS NOR followed by an inverter, y = a | b.
// STYLE_GDI:  a "modified" GDI OR gate of three two-transistor stages: an
//   inverter on a, a GDI cell gated by b whose pMOS source is the inverted a
//   and whose nMOS source is ground (giving ~a & ~b, a NOR), and an output
//   inverter, so y = a | b. The three-stage shape follows the design; which
//   input goes where inside the stages is this design's own choice.
//
// Interface: a, b in; y out. Combinational.
module vm_or2 #(
  parameter vm_pkg::logic_style_e STYLE = vm_pkg::STYLE_GDI
) (
  input  logic a,
  input  logic b,
  output logic y
);

  if (STYLE == vm_pkg::STYLE_GDI) begin : g_gdi
    logic abar, nor_ab;
    gdi_cell u_inv_a (.g(a),      .p(1'b1), .n(1'b0), .d(abar));
    gdi_cell u_nor   (.g(b),      .p(abar), .n(1'b0), .d(nor_ab));
    gdi_cell u_inv_y (.g(nor_ab), .p(1'b1), .n(1'b0), .d(y));
  end else begin : g_cmos
    always_comb y = a | b;
  end

endmodule
