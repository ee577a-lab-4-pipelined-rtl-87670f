// bw_row_tb: exhaustive check of the 5-cell ripple adder row: for every x and
// y, {co, s} must equal x + y.
module bw_row_tb;
  localparam int W = 5;
  logic [W-1:0] x, y, s;
  logic         co;
  int           checks = 0, failures = 0;

  bw_row #(.W(W)) dut (.x, .y, .s, .co);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << W); i++)
      for (int j = 0; j < (1 << W); j++) begin
        x = W'(i);
        y = W'(j);
        #1;
        checks++;
        if ({co, s} != (W+1)'(i + j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d -> %0d", i, j, {co, s});
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
