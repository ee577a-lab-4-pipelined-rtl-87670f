// mul5_pipe_opt: pipelined 5-bit two's complement multiplier with staggered
// ("twisted") register levels.
//
// Same Baugh-Wooley array and the same function as mul5_pipe: s = a * b, a and
// b signed 5-bit, s signed 10-bit, three register levels, four stages, s valid
// after the third rising clock edge, one new operand pair per cycle. What
// differs is where each register level cuts the array. The simple version cuts
// straight across between adder rows. Here each level is a staircase: across
// the high (left) cells of the array it sits right after adder row r, as
// before, but across the low (right) RIGHT_CELLS cells it sits after row r+1.
// The low cells of row r+1 only need low sum bits of row r, which are ready
// early in row r's carry ripple, so they are computed in the same stage as row
// r, in parallel with the rest of its ripple. Their carry into the high part
// of row r+1 is registered and enters the next stage as that part's carry in.
// Stage 1 thus holds rows 1 and the low cells of row 2; stages 2 and 3 hold the
// high cells of one row and the low cells of the next; stage 4 holds only the
// high cells of row 4 and the final inversion of its carry (the 2^9 constant).
//
// Per register level: product bits already final, the high sum bits of row r
// still needed, row r's carry out, the low sums of row r+1 and their carry,
// all of a, and the bits of b still needed: 16 flip-flops, one more than a
// level of mul5_pipe (the carry that crosses the staircase).
//
// The staircase placement and its rationale follow the document; the number
// of low cells moved (RIGHT_CELLS = 2) is this design's choice, chosen so the
// longest stage (stage 1: row 1, or three cells of row 1 then two of row 2)
// is five adder cells, as in the simple version, while stages 2 to 4 become
// shorter. Reset as in mul5_pipe.
module mul5_pipe_opt
  import mul5_pkg::*;
#(
  parameter int unsigned RIGHT_CELLS = 2   // 1..3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] a,
  input  logic [4:0] b,
  output logic [9:0] s
);
  localparam int unsigned K = RIGHT_CELLS;   // low cells per row moved up a stage
  localparam int unsigned L = 5 - K;         // high cells per row

  initial assert (K >= 1 && K <= 3) else $error("RIGHT_CELLS must be 1..3");

  // ---------------- stage 1: row 1, low cells of row 2 ----------------
  logic [4:0]   x1, y1, s1;
  logic         co1;
  logic [K-1:0] x2r, y2r, s2r;
  logic         cr2;

  always_comb begin
    for (int unsigned k = 0; k < 4; k++) x1[k] = bw_pp(a[k+1], b[0], k + 1, 0);
    x1[4] = 1'b1;                                          // constant 2^5
    for (int unsigned k = 0; k < 5; k++) y1[k] = bw_pp(a[k], b[1], k, 1);
    for (int unsigned k = 0; k < K; k++) begin
      x2r[k] = s1[k+1];
      y2r[k] = bw_pp(a[k], b[2], k, 2);
    end
  end

  bw_row #(.W(5)) u_row1  (.x(x1),  .y(y1),  .s(s1),  .co(co1));
  bw_row #(.W(K)) u_row2r (.x(x2r), .y(y2r), .s(s2r), .co(cr2));

  // register level 1
  logic [1:0]   p1_q;
  logic [L-2:0] l1_q;
  logic         co1_q, cr2_q;
  logic [K-1:0] r2_q;
  logic [4:0]   a1_q;
  logic [4:2]   b1_q;

  pipe_reg #(.W(2))   u_p1  (.clk, .rst_n, .d({s1[0], bw_pp(a[0], b[0], 0, 0)}), .q(p1_q));
  pipe_reg #(.W(L-1)) u_l1  (.clk, .rst_n, .d(s1[4:K+1]), .q(l1_q));
  pipe_reg #(.W(1))   u_c1  (.clk, .rst_n, .d(co1),       .q(co1_q));
  pipe_reg #(.W(K))   u_r2  (.clk, .rst_n, .d(s2r),       .q(r2_q));
  pipe_reg #(.W(1))   u_cr2 (.clk, .rst_n, .d(cr2),       .q(cr2_q));
  pipe_reg #(.W(5))   u_a1  (.clk, .rst_n, .d(a),         .q(a1_q));
  pipe_reg #(.W(3))   u_b1  (.clk, .rst_n, .d(b[4:2]),    .q(b1_q));

  // ---------------- stage 2: high cells of row 2, low cells of row 3 ----------------
  logic [L-1:0] y2l, s2l;
  logic         co2;
  logic [4:0]   s2;
  logic [K-1:0] x3r, y3r, s3r;
  logic         cr3;

  always_comb begin
    for (int unsigned j = 0; j < L; j++) y2l[j] = bw_pp(a1_q[K+j], b1_q[2], K + j, 2);
    s2 = {s2l, r2_q};
    for (int unsigned k = 0; k < K; k++) begin
      x3r[k] = s2[k+1];
      y3r[k] = bw_pp(a1_q[k], b1_q[3], k, 3);
    end
  end

  fa_chain #(.W(L)) u_row2l (.x({co1_q, l1_q}), .y(y2l), .ci(cr2_q), .s(s2l), .co(co2));
  bw_row   #(.W(K)) u_row3r (.x(x3r), .y(y3r), .s(s3r), .co(cr3));

  // register level 2
  logic [2:0]   p2_q;
  logic [L-2:0] l2_q;
  logic         co2_q, cr3_q;
  logic [K-1:0] r3_q;
  logic [4:0]   a2_q;
  logic [4:3]   b2_q;

  pipe_reg #(.W(3))   u_p2  (.clk, .rst_n, .d({s2[0], p1_q}), .q(p2_q));
  pipe_reg #(.W(L-1)) u_l2  (.clk, .rst_n, .d(s2[4:K+1]),     .q(l2_q));
  pipe_reg #(.W(1))   u_c2  (.clk, .rst_n, .d(co2),           .q(co2_q));
  pipe_reg #(.W(K))   u_r3  (.clk, .rst_n, .d(s3r),           .q(r3_q));
  pipe_reg #(.W(1))   u_cr3 (.clk, .rst_n, .d(cr3),           .q(cr3_q));
  pipe_reg #(.W(5))   u_a2  (.clk, .rst_n, .d(a1_q),          .q(a2_q));
  pipe_reg #(.W(2))   u_b2  (.clk, .rst_n, .d(b1_q[4:3]),     .q(b2_q));

  // ---------------- stage 3: high cells of row 3, low cells of row 4 ----------------
  logic [L-1:0] y3l, s3l;
  logic         co3;
  logic [4:0]   s3;
  logic [K-1:0] x4r, y4r, s4r;
  logic         cr4;

  always_comb begin
    for (int unsigned j = 0; j < L; j++) y3l[j] = bw_pp(a2_q[K+j], b2_q[3], K + j, 3);
    s3 = {s3l, r3_q};
    for (int unsigned k = 0; k < K; k++) begin
      x4r[k] = s3[k+1];
      y4r[k] = bw_pp(a2_q[k], b2_q[4], k, 4);
    end
  end

  fa_chain #(.W(L)) u_row3l (.x({co2_q, l2_q}), .y(y3l), .ci(cr3_q), .s(s3l), .co(co3));
  bw_row   #(.W(K)) u_row4r (.x(x4r), .y(y4r), .s(s4r), .co(cr4));

  // register level 3
  logic [3:0]   p3_q;
  logic [L-2:0] l3_q;
  logic         co3_q, cr4_q;
  logic [K-1:0] r4_q;
  logic [4:0]   a3_q;
  logic         b3_q;

  pipe_reg #(.W(4))   u_p3  (.clk, .rst_n, .d({s3[0], p2_q}), .q(p3_q));
  pipe_reg #(.W(L-1)) u_l3  (.clk, .rst_n, .d(s3[4:K+1]),     .q(l3_q));
  pipe_reg #(.W(1))   u_c3  (.clk, .rst_n, .d(co3),           .q(co3_q));
  pipe_reg #(.W(K))   u_r4  (.clk, .rst_n, .d(s4r),           .q(r4_q));
  pipe_reg #(.W(1))   u_cr4 (.clk, .rst_n, .d(cr4),           .q(cr4_q));
  pipe_reg #(.W(5))   u_a3  (.clk, .rst_n, .d(a2_q),          .q(a3_q));
  pipe_reg #(.W(1))   u_b3  (.clk, .rst_n, .d(b2_q[4]),       .q(b3_q));

  // ---------------- stage 4: high cells of row 4, bit 9 ----------------
  logic [L-1:0] y4l, s4l;
  logic         co4;

  always_comb begin
    for (int unsigned j = 0; j < L; j++) y4l[j] = bw_pp(a3_q[K+j], b3_q, K + j, 4);
  end

  fa_chain #(.W(L)) u_row4l (.x({co3_q, l3_q}), .y(y4l), .ci(cr4_q), .s(s4l), .co(co4));

  // bit 9 is the inverted final carry: adding the 2^9 constant
  assign s = {~co4, s4l, r4_q, p3_q};
endmodule
