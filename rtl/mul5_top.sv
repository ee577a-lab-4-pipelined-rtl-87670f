// mul5_top: the two pipelined 5-bit two's complement multipliers side by side.
//
// mul5_pipe cuts the Baugh-Wooley array straight across between adder rows;
// mul5_pipe_opt staggers the cuts so the stages are better balanced. Both
// compute p = a * b (signed 5-bit operands, signed 10-bit product) with three
// register levels: an operand pair sampled on a rising clock edge appears at
// the output after the third rising edge, and a new pair can enter every
// cycle. Each multiplier has its own operand and product ports; they share
// the clock and the active-low asynchronous reset.
module mul5_top (
  input  logic       clk,
  input  logic       rst_n,
  // simple pipeline
  input  logic [4:0] a,
  input  logic [4:0] b,
  output logic [9:0] s,
  // staggered (optimized) pipeline
  input  logic [4:0] a_opt,
  input  logic [4:0] b_opt,
  output logic [9:0] s_opt
);
  mul5_pipe     u_pipe (.clk(clk), .rst_n(rst_n), .a(a),     .b(b),     .s(s));
  mul5_pipe_opt u_opt  (.clk(clk), .rst_n(rst_n), .a(a_opt), .b(b_opt), .s(s_opt));
endmodule
