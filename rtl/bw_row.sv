// bw_row: one adder level of the array multiplier.
//
// A W-cell ripple-carry row: cell 0 is a half adder, cells 1..W-1 are full
// adders, and the carry runs from cell 0 towards cell W-1. Cell k adds x[k]
// (the incoming partial sum) and y[k] (this row's partial product) and the
// carry from cell k-1. co is the carry out of cell W-1, which becomes the top
// bit of the partial sum handed to the next row. Combinational.
//
// The cell arrangement (HA at the low end, then FAs, carry rippling towards
// the high end) follows the document's array figure and stage schematics.
module bw_row #(
  parameter int unsigned W = 5
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W:1] c;   // c[k] is the carry into cell k

  half_adder u_ha (.a(x[0]), .b(y[0]), .s(s[0]), .co(c[1]));

  for (genvar k = 1; k < W; k++) begin : g_fa
    full_adder u_fa (.a(x[k]), .b(y[k]), .ci(c[k]), .s(s[k]), .co(c[k+1]));
  end

  assign co = c[W];
endmodule
