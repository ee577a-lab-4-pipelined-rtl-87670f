// mul5_stage2: second stage of the simple pipelined 5-bit multiplier.
//
// Adds partial-product row 2 (a*b[2], shifted by 2) to the partial sum from
// stage 1. Bits 1..0 of that sum are already final and pass straight on; bits
// 5..2 and the stage-1 carry (bit 6) enter a 5-cell ripple row. The result,
// partial sum bits 0..6 and the new carry (bit 7), is registered with a and
// b[4:3].
//
// Interface: c1, q1, a, b[4:2] from stage 1; c2, q2[6:0], a2, b2[4:3] out,
// registered. Port set follows the document's stage-2 symbol.
module mul5_stage2
  import mul5_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       c1,
  input  logic [5:0] q1,
  input  logic [4:0] a,
  input  logic [4:2] b,
  output logic       c2,
  output logic [6:0] q2,
  output logic [4:0] a2,
  output logic [4:3] b2
);
  logic [4:0] x, y, s;
  logic       co;

  always_comb begin
    x = {c1, q1[5:2]};
    for (int unsigned k = 0; k < 5; k++) y[k] = bw_pp(a[k], b[2], k, 2);
  end

  bw_row #(.W(5)) u_row (.x(x), .y(y), .s(s), .co(co));

  pipe_reg #(.W(1)) u_rc (.clk(clk), .rst_n(rst_n), .d(co),            .q(c2));
  pipe_reg #(.W(7)) u_rq (.clk(clk), .rst_n(rst_n), .d({s, q1[1:0]}),  .q(q2));
  pipe_reg #(.W(5)) u_ra (.clk(clk), .rst_n(rst_n), .d(a),             .q(a2));
  pipe_reg #(.W(2)) u_rb (.clk(clk), .rst_n(rst_n), .d(b[4:3]),        .q(b2));
endmodule
