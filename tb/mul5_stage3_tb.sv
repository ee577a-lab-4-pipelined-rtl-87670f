// mul5_stage3_tb: drives random stage-2 results and operands into stage 3 and
// checks, one clock later, that {c3, q3} = {c2, q2} + (row 3 << 3) and that a
// and b[4] were registered. Also checks reset.
module mul5_stage3_tb;
  logic       clk = 0, rst_n = 1;
  logic       c2 = 0;
  logic [6:0] q2 = '0;
  logic [4:0] a = '0;
  logic [4:3] b = '0;
  logic       c3;
  logic [7:0] q3;
  logic [4:0] a3;
  logic       b3;
  int         checks = 0, failures = 0;

  mul5_stage3 dut (.clk, .rst_n, .c2, .q2, .a, .b, .c3, .q3, .a3, .b3);

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
    repeat (5000) @(posedge clk);
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
    if ({c3, q3, a3, b3} != '0) begin failures++; $display("FAIL reset"); end
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      {c2, q2} = 8'($urandom);
      a = 5'($urandom);
      b = 2'($urandom);
      exp = int'({c2, q2}) + (row_val(a, b[3], 3) << 3);
      @(posedge clk) #1;
      checks++;
      if ({c3, q3} != 9'(exp) || a3 != a || b3 != b[4]) begin
        failures++;
        if (failures < 10) $display("FAIL {c3,q3}=%0d exp %0d", {c3, q3}, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
