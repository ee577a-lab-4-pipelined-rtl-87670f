// mul5_pipe: simple pipelined 5-bit two's complement multiplier.
//
// s = a * b, with a and b signed 5-bit and s signed 10-bit. The Baugh-Wooley
// array has four adder rows; a register level after each of the first three
// rows splits it into four stages (mul5_stage1..4). Stage 1 also forms the
// first two partial-product rows, so each stage holds one ripple row of five
// adder cells.
//
// Timing: a and b are sampled on a rising clock edge; after the third rising
// edge s holds their product: s[3:0] straight from the third register level
// and s[9:4] one ripple row later (stage 4 has no output register). A new
// pair can be applied every cycle. rst_n (active low, asynchronous) clears
// all registers. An all-zero register state is not the encoding of any
// product (the array's constants and inverted partial products are folded
// into the partial sums), so s is not meaningful during reset or until three
// rising edges after reset is released.
//
// The stage split, the port names of the stages and the output wiring
// (s[3:0] from stage 3, s[9:4] from stage 4) follow the document's top-level
// schematic.
module mul5_pipe
  import mul5_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] a,
  input  logic [4:0] b,
  output logic [9:0] s
);
  logic       c1, c2, c3;
  logic [5:0] q1;
  logic [6:0] q2;
  logic [7:0] q3;
  logic [4:0] a1, a2, a3;
  logic [4:2] b1;
  logic [4:3] b2;
  logic       b3;
  logic [9:4] q4;

  mul5_stage1 u_st1 (.clk(clk), .rst_n(rst_n), .a(a), .b(b),
                     .c1(c1), .q1(q1), .a1(a1), .b1(b1));
  mul5_stage2 u_st2 (.clk(clk), .rst_n(rst_n), .c1(c1), .q1(q1), .a(a1), .b(b1),
                     .c2(c2), .q2(q2), .a2(a2), .b2(b2));
  mul5_stage3 u_st3 (.clk(clk), .rst_n(rst_n), .c2(c2), .q2(q2), .a(a2), .b(b2),
                     .c3(c3), .q3(q3), .a3(a3), .b3(b3));
  mul5_stage4 u_st4 (.c3(c3), .q3(q3[7:4]), .a(a3), .b(b3), .q4(q4));

  assign s = {q4, q3[3:0]};
endmodule
