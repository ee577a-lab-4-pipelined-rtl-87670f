// mul5_stage3: third stage of the simple pipelined 5-bit multiplier.
//
// Adds partial-product row 3 (a*b[3], shifted by 3) to the partial sum from
// stage 2. Bits 2..0 pass straight on; bits 6..3 and the stage-2 carry (bit 7)
// enter a 5-cell ripple row. The result, partial sum bits 0..7 and the new
// carry (bit 8), is registered with a and b[4]. Bits 3..0 of this register
// are already the final low product bits.
//
// Interface: c2, q2, a, b[4:3] from stage 2; c3, q3[7:0], a3, b3 out,
// registered. Port set follows the document's stage-3 symbol.
module mul5_stage3
  import mul5_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       c2,
  input  logic [6:0] q2,
  input  logic [4:0] a,
  input  logic [4:3] b,
  output logic       c3,
  output logic [7:0] q3,
  output logic [4:0] a3,
  output logic       b3
);
  logic [4:0] x, y, s;
  logic       co;

  always_comb begin
    x = {c2, q2[6:3]};
    for (int unsigned k = 0; k < 5; k++) y[k] = bw_pp(a[k], b[3], k, 3);
  end

  bw_row #(.W(5)) u_row (.x(x), .y(y), .s(s), .co(co));

  pipe_reg #(.W(1)) u_rc (.clk(clk), .rst_n(rst_n), .d(co),            .q(c3));
  pipe_reg #(.W(8)) u_rq (.clk(clk), .rst_n(rst_n), .d({s, q2[2:0]}),  .q(q3));
  pipe_reg #(.W(5)) u_ra (.clk(clk), .rst_n(rst_n), .d(a),             .q(a3));
  pipe_reg #(.W(1)) u_rb (.clk(clk), .rst_n(rst_n), .d(b[4]),          .q(b3));
endmodule
