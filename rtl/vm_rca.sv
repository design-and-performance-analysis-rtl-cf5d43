// WIDTH-bit ripple-carry adder: WIDTH full adders in a chain, the carry out
// of stage i feeding the carry in of stage i+1.
//
// The design uses a 4-bit version (WIDTH = 4, the default) inside the 4x4
// multiplier and an 8-bit version inside the 8x8 multiplier. The worst-case
// delay is WIDTH full-adder carry delays; there is no clock.
//
// Interface: x, y (WIDTH bits) and cin in; sum (WIDTH bits) and cout out,
// with {cout, sum} = x + y + cin.
module vm_rca #(
  parameter int unsigned          WIDTH = 4,
  parameter vm_pkg::logic_style_e STYLE = vm_pkg::STYLE_GDI
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] c;  // c[i] is the carry into stage i

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    vm_full_adder #(.STYLE(STYLE)) u_fa (
      .a    (x[i]),
      .b    (y[i]),
      .c    (c[i]),
      .sum  (sum[i]),
      .carry(c[i+1])
    );
  end

  assign cout = c[WIDTH];

endmodule
