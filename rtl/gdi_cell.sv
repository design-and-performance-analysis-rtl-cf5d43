// Gate Diffusion Input (GDI) basic cell, logic view.
//
// The cell is a pMOS/nMOS pair with a common gate G, like an inverter, but
// with the pMOS source brought out as input P and the nMOS source as input N
// instead of being tied to the rails. With G = 0 the pMOS conducts and the
// common drain D follows P; with G = 1 the nMOS conducts and D follows N.
// Logically the cell is therefore a 2:1 multiplexer, D = G ? N : P, and the
// input configuration selects the function:
//
//   N  P  G   D
//   0  B  A   ~A & B        (F1)
//   B  1  A   ~A | B        (F2)
//   1  B  A   A | B         (OR)
//   B  0  A   A & B         (AND)
//   C  B  A   ~A&B | A&C    (MUX)
//   0  1  A   ~A            (NOT)
//
// The reduced voltage swing of a real two-transistor cell is an analog
// effect and is not modelled; the table above is the design's, the
// multiplexer formulation follows from it.
//
// Interface: g, p, n in; d out. Purely combinational, no timing.
module gdi_cell (
  input  logic g,  // common gate of the nMOS/pMOS pair
  input  logic p,  // pMOS source/drain input
  input  logic n,  // nMOS source/drain input
  output logic d   // common drain (cell output)
);

  always_comb d = g ? n : p;

endmodule
