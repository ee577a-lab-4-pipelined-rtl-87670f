// mul5_stage1: first stage of the simple pipelined 5-bit multiplier.
//
// Forms partial-product rows 0 and 1 (a*b[0] and a*b[1], with NAND gates where
// a[4] meets a low bit of b) and adds them in one 5-cell ripple row. The fifth
// cell's spare input is tied to 1: this is the Baugh-Wooley constant at bit 5.
// The result is partial sum bits 0..5 plus the row's carry out (bit 6), and
// all of it is registered on the rising clock edge together with the operand
// bits the later stages still need: all of a, and b[4:2].
//
// Interface: a, b in; c1, q1[5:0], a1[4:0], b1[4:2] out, all registered
// (valid one clock after a, b are sampled). Port set and bit ranges follow the
// document's stage-1 symbol; the reset is active low (see pipe_reg).
module mul5_stage1
  import mul5_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] a,
  input  logic [4:0] b,
  output logic       c1,
  output logic [5:0] q1,
  output logic [4:0] a1,
  output logic [4:2] b1
);
  logic [4:0] x, y, s;
  logic       co;

  always_comb begin
    for (int unsigned k = 0; k < 4; k++) x[k] = bw_pp(a[k+1], b[0], k + 1, 0);
    x[4] = 1'b1;                               // constant 2^5
    for (int unsigned k = 0; k < 5; k++) y[k] = bw_pp(a[k], b[1], k, 1);
  end

  bw_row #(.W(5)) u_row (.x(x), .y(y), .s(s), .co(co));

  pipe_reg #(.W(1)) u_rc (.clk(clk), .rst_n(rst_n), .d(co),
                          .q(c1));
  pipe_reg #(.W(6)) u_rq (.clk(clk), .rst_n(rst_n), .d({s, bw_pp(a[0], b[0], 0, 0)}),
                          .q(q1));
  pipe_reg #(.W(5)) u_ra (.clk(clk), .rst_n(rst_n), .d(a),
                          .q(a1));
  pipe_reg #(.W(3)) u_rb (.clk(clk), .rst_n(rst_n), .d(b[4:2]),
                          .q(b1));
endmodule
