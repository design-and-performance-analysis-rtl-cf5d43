// Two-input XOR gate in either circuit style.
//
// STYLE_CMOS: the complementary-input CMOS XOR (it uses the inverted
//   inputs abar and bbar from two inverters), y = a ^ b.
// STYLE_GDI:  a "modified" GDI XOR: an inverter makes bbar, and a GDI cell in
//   its MUX configuration (G = a, P = b, N = bbar) gives a ? ~b : b = a ^ b;
//   an inverter pair on the output restores the level, as the modified gates
//   of this design add inverters for waveform shaping. The exact transistor
//   arrangement of the GDI XOR is this design's own choice, built only from
//   the configurations of gdi_cell.
//
// Interface: a, b in; y out. Combinational.
module vm_xor2 #(
  parameter vm_pkg::logic_style_e STYLE = vm_pkg::STYLE_GDI
) (
  input  logic a,
  input  logic b,
  output logic y
);

  if (STYLE == vm_pkg::STYLE_GDI) begin : g_gdi
    logic bbar, x, xbar;
    gdi_cell u_inv_b (.g(b),    .p(1'b1), .n(1'b0), .d(bbar));
    gdi_cell u_mux   (.g(a),    .p(b),    .n(bbar), .d(x));
    gdi_cell u_buf0  (.g(x),    .p(1'b1), .n(1'b0), .d(xbar));
    gdi_cell u_buf1  (.g(xbar), .p(1'b1), .n(1'b0), .d(y));
  end else begin : g_cmos
    always_comb y = a ^ b;
  end

endmodule
