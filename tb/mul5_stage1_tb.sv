// mul5_stage1_tb: drives random operands into stage 1 and checks, one clock
// later, that {c1, q1} equals the arithmetic sum of partial-product rows 0
// and 1 (row 1 weighted by 2) plus the 2^5 constant, and that a and b[4:2]
// were registered. Also checks that reset clears every output.
module mul5_stage1_tb;
  logic       clk = 0, rst_n = 1;
  logic [4:0] a = '0, b = '0;
  logic       c1;
  logic [5:0] q1;
  logic [4:0] a1;
  logic [4:2] b1;
  int         checks = 0, failures = 0;

  mul5_stage1 dut (.clk, .rst_n, .a, .b, .c1, .q1, .a1, .b1);

  always #5 clk = ~clk;

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
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    #1 rst_n = 0;
    #1;
    checks++;
    if ({c1, q1, a1, b1} != '0) begin failures++; $display("FAIL reset"); end
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 1024; n++) begin
      @(negedge clk);
      a = 5'(n);
      b = 5'(n >> 5);
      exp = row_val(a, b[0], 0) + (row_val(a, b[1], 1) << 1) + 32;
      @(posedge clk) #1;
      checks++;
      if ({c1, q1} != 7'(exp) || a1 != a || b1 != b[4:2]) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%b b=%b: {c1,q1}=%0d exp %0d a1=%b b1=%b", a, b, {c1, q1}, exp, a1, b1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
