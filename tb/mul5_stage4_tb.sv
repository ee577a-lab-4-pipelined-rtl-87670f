// mul5_stage4_tb: exhaustive check of the combinational last stage: q4 must
// equal bits 9..4 of ({c3, q3[7:4]} + row 4 + 2^5) << 4, i.e. the sum of the
// incoming partial sum, the last partial-product row and the 2^9 constant,
// modulo 2^10.
module mul5_stage4_tb;
  logic       c3;
  logic [7:4] q3;
  logic [4:0] a;
  logic       b;
  logic [9:4] q4;
  int         checks = 0, failures = 0;

  mul5_stage4 dut (.c3, .q3, .a, .b, .q4);

  // Value of Baugh-Wooley partial-product row j (unshifted): bit i is
  // a[i]&b[j], inverted when exactly one of i, j is the sign position 4.
  function automatic int row_val(input logic [4:0] av, input logic bj, input int j);
    int v = 0;
    for (int i = 0; i < 5; i++) begin
      int p = (av[i] & bj) ? 1 : 0;
      if ((i == 4) != (j == 4)) p = 1 - p;
      v += p << i;
    end
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int n = 0; n < 2048; n++) begin
      {c3, q3, a, b} = 11'(n);
      exp = (int'({c3, q3}) + row_val(a, b, 4) + 32) % 64;
      #1;
      checks++;
      if (q4 != 6'(exp)) begin
        failures++;
        if (failures < 10) $display("FAIL c3=%b q3=%b a=%b b=%b: q4=%0d exp %0d", c3, q3, a, b, q4, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
