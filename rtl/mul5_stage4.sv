// mul5_stage4: fourth and last stage of the simple pipelined 5-bit multiplier.
//
// Adds partial-product row 4 (a*b[4], shifted by 4; NAND gates for a[3:0]&b[4],
// AND for a[4]&b[4]) to partial sum bits 7..4 and the stage-3 carry (bit 8) in
// a 5-cell ripple row. The row's carry out goes through a half adder whose
// other input is 1, so bit 9 is the inverted carry: this adds the second
// Baugh-Wooley constant, 2^9. The outputs are product bits 9..4.
//
// Combinational, with no register after it: product bits 9..4 settle one
// stage delay after the third register level, as in the document's top-level
// schematic, where this stage has no clock pin.
module mul5_stage4
  import mul5_pkg::*;
(
  input  logic       c3,
  input  logic [7:4] q3,
  input  logic [4:0] a,
  input  logic       b,
  output logic [9:4] q4
);
  logic [4:0] x, y, s;
  logic       co;

  always_comb begin
    x = {c3, q3[7:4]};
    for (int unsigned k = 0; k < 5; k++) y[k] = bw_pp(a[k], b, k, 4);
  end

  bw_row #(.W(5)) u_row (.x(x), .y(y), .s(s), .co(co));

  // half adder with a constant 1 input: its sum is the inverted carry
  logic unused_co9;
  half_adder u_ha9 (.a(co), .b(1'b1), .s(q4[9]), .co(unused_co9));

  assign q4[8:4] = s;
endmodule
