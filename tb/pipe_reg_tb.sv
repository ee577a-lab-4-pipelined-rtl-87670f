// pipe_reg_tb: checks that an 8-bit pipe_reg returns each input one clock
// later, that an asserted reset clears it at once without waiting for a clock
// edge, and that it holds zero while reset stays low.
module pipe_reg_tb;
  localparam int W = 8;
  logic         clk = 0, rst_n = 1;
  logic [W-1:0] d = '0, q, prev;
  int           checks = 0, failures = 0;

  pipe_reg #(.W(W)) dut (.clk, .rst_n, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, exp);
    end
  endtask

  initial begin
    #1 rst_n = 0;
    #1 check('0, "in reset");
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      prev = d;
      d = W'($urandom);
      @(posedge clk) #1;
      check(d, "one cycle later");
      if (i == 50) begin
        // asynchronous reset mid-cycle
        #2 rst_n = 0;
        #1 check('0, "asynchronous clear");
        @(posedge clk) #1 check('0, "held in reset");
        @(negedge clk) rst_n = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
