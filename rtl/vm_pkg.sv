// Shared definitions for the Vedic (Urdhva Tiryagbhyam) multiplier.
//
// The multiplier can be described in two circuit styles that have the same
// logic function but different gate structures: static CMOS gates and gates
// built from Gate Diffusion Input (GDI) cells. Every gate, adder and
// multiplier module takes a STYLE parameter of type logic_style_e that picks
// which structure is elaborated. The default is GDI, the style the design
// is chiefly presented in; CMOS is its comparison point with identical
// logic. No module in this design has a clock: everything is combinational.
package vm_pkg;

  typedef enum logic [0:0] {
    STYLE_CMOS = 1'b0,  // plain static CMOS gate: the Boolean function itself
    STYLE_GDI  = 1'b1   // gate assembled from GDI cells (see gdi_cell)
  } logic_style_e;

endpackage
