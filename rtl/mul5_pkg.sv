// mul5_pkg: constants and the partial-product rule shared by the pipelined
// 5-bit two's complement multipliers.
//
// The multiplier is a Baugh-Wooley array. For N-bit signed operands a and b,
// the partial product bit a[i]&b[j] enters the array as is, except when
// exactly one of i, j is the sign position N-1: that bit enters inverted (a
// NAND gate in the array). The product is then exact modulo 2^(2N) once a
// constant 1 is added at bit N and at bit 2N-1. The array places the first of
// these constants on a spare input of the first adder row and the second by
// inverting the final carry.
//
// The operand width of 5 and product width of 10 follow the document; the
// NAND/AND pattern follows its stage schematics.
package mul5_pkg;

  localparam int unsigned N  = 5;       // operand width
  localparam int unsigned PW = 2 * N;   // product width

  typedef logic signed [N-1:0]  operand_t;
  typedef logic signed [PW-1:0] product_t;

  // Baugh-Wooley partial product bit: ai = a[i], bj = b[j].
  function automatic logic bw_pp(input logic ai, input logic bj,
                                 input int unsigned i, input int unsigned j);
    if ((i == N - 1) != (j == N - 1)) return ~(ai & bj);
    return ai & bj;
  endfunction

endpackage
