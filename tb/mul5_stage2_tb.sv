// mul5_stage2_tb: drives random stage-1 results and operands into stage 2 and
// checks, one clock later, that {c2, q2} = {c1, q1} + (row 2 << 2) and that a
// and b[4:3] were registered. Also checks reset.
module mul5_stage2_tb;
  logic       clk = 0, rst_n = 1;
  logic       c1 = 0;
  logic [5:0] q1 = '0;
  logic [4:0] a = '0;
  logic [4:2] b = '0;
  logic       c2;
  logic [6:0] q2;
  logic [4:0] a2;
  logic [4:3] b2;
  int         checks = 0, failures = 0;

  mul5_stage2 dut (.clk, .rst_n, .c1, .q1, .a, .b, .c2, .q2, .a2, .b2);

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
    if ({c2, q2, a2, b2} != '0) begin failures++; $display("FAIL reset"); end
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      {c1, q1} = 7'($urandom);
      a = 5'($urandom);
      b = 3'($urandom);
      exp = int'({c1, q1}) + (row_val(a, b[2], 2) << 2);
      @(posedge clk) #1;
      checks++;
      if ({c2, q2} != 8'(exp) || a2 != a || b2 != b[4:3]) begin
        failures++;
        if (failures < 10) $display("FAIL {c2,q2}=%0d exp %0d", {c2, q2}, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
