// fa_chain: a W-cell ripple chain of full adders with an external carry in.
//
// Cell j adds x[j], y[j] and the carry from cell j-1 (ci for cell 0); co is
// the carry out of cell W-1. Combinational. It is the upper part of an adder
// row whose lower cells sit in the previous pipeline stage, as in the
// optimized multiplier, where the carry between the two parts crosses a
// register.
module fa_chain #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W:0] c;   // c[j] is the carry into cell j

  assign c[0] = ci;

  for (genvar j = 0; j < W; j++) begin : g_fa
    full_adder u_fa (.a(x[j]), .b(y[j]), .ci(c[j]), .s(s[j]), .co(c[j+1]));
  end

  assign co = c[W];
endmodule
