// mul5_pipe_opt_tb: end-to-end test of the staggered-register multiplier (mul5_pipe_opt) at its default
// RIGHT_CELLS = 2, with instances at RIGHT_CELLS = 1 and 3 run alongside on
// the same operands.
//
// Streams every one of the 1024 signed operand pairs back to back, one per
// clock, then the document's directed vectors (0*0, 1*3, 2*6, 3*3, 8*2) and
// random pairs, and checks on every cycle that the product of the pair
// sampled three rising edges earlier is on s: this checks both the value and
// the latency of three register levels. An asynchronous reset in the middle
// of the stream discards the pairs in flight; the test then checks that the
// pipeline refills and produces correct products three edges later.
module mul5_pipe_opt_tb;
  logic       clk = 0, rst_n = 1;
  logic [4:0] a = '0, b = '0;
  logic [9:0] s, s_k1, s_k3;
  int         checks = 0, failures = 0;

  // history of sampled pairs, newest first; valid[i] says the entry is real
  logic signed [4:0] ha [3], hb [3];
  logic              hv [3];

  mul5_pipe_opt                     dut    (.clk, .rst_n, .a, .b, .s);
  mul5_pipe_opt #(.RIGHT_CELLS(1))  dut_k1 (.clk, .rst_n, .a, .b, .s(s_k1));
  mul5_pipe_opt #(.RIGHT_CELLS(3))  dut_k3 (.clk, .rst_n, .a, .b, .s(s_k3));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // record what each rising edge samples
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) hv[i] <= 1'b0;
    end else begin
      ha[0] <= a;  hb[0] <= b;  hv[0] <= 1'b1;
      for (int i = 1; i < 3; i++) begin
        ha[i] <= ha[i-1];  hb[i] <= hb[i-1];  hv[i] <= hv[i-1];
      end
    end
  end

  // the product must appear after the third rising edge
  task automatic check_out(input string what);
    logic signed [9:0] exp;
    if (!hv[2]) return;   // pipeline still filling after reset: s is not a product yet
    exp = 10'(int'(ha[2]) * int'(hb[2]));
    checks++;
    if (s !== exp || s_k1 !== exp || s_k3 !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: s=%0d (K=1: %0d, K=3: %0d) expected %0d", what, $signed(s), $signed(s_k1), $signed(s_k3), exp);
    end
  endtask

  task automatic step(input int av, input int bv);
    @(negedge clk);
    check_out("stream");
    a = 5'(av);
    b = 5'(bv);
  endtask

  initial begin
    #1 rst_n = 0;
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) step(i, j);
    step(0, 0); step(1, 3); step(2, 6); step(3, 3); step(8, 2);
    repeat (200) step(int'($urandom), int'($urandom));
    // reset in the middle of the stream
    #2 rst_n = 0;
    @(negedge clk) rst_n = 1;
    repeat (50) step(int'($urandom), int'($urandom));
    // hold one pair: output must settle on its product and stay there
    repeat (6) step(-16, -16);
    repeat (4) begin
      @(negedge clk) check_out("hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
