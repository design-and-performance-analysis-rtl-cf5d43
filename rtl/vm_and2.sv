// Two-input AND gate in either circuit style.
//
// STYLE_CMOS: the static CMOS NAND followed by an inverter, i.e. y = a & b.
// STYLE_GDI:  the "modified" GDI AND gate: input a is first inverted (a GDI
//   cell in its NOT configuration, equivalent to a CMOS inverter) and the
//   inverted value drives the gate of a second GDI cell whose pMOS source is
//   b and whose nMOS source is ground. With abar = 1 the output is pulled to
//   0, with abar = 0 it follows b, so y = a & b. This inverter-then-cell
//   arrangement follows the design; the extra inverter is there for output
//   waveform shaping in the transistor circuit.
//
// Interface: a, b in; y out. Combinational.
module vm_and2 #(
  parameter vm_pkg::logic_style_e STYLE = vm_pkg::STYLE_GDI
) (
  input  logic a,
  input  logic b,
  output logic y
);

  if (STYLE == vm_pkg::STYLE_GDI) begin : g_gdi
    logic abar;
    gdi_cell u_inv  (.g(a),    .p(1'b1), .n(1'b0), .d(abar));
    gdi_cell u_cell (.g(abar), .p(b),    .n(1'b0), .d(y));
  end else begin : g_cmos
    always_comb y = a & b;
  end

endmodule
