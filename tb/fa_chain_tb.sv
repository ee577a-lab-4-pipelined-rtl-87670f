// fa_chain_tb: exhaustive check of a 3-cell full-adder chain: for every x, y
// and carry in, {co, s} must equal x + y + ci.
module fa_chain_tb;
  localparam int W = 3;
  logic [W-1:0] x, y, s;
  logic         ci, co;
  int           checks = 0, failures = 0;

  fa_chain #(.W(W)) dut (.x, .y, .ci, .s, .co);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << W); i++)
      for (int j = 0; j < (1 << W); j++)
        for (int c = 0; c < 2; c++) begin
          x  = W'(i);
          y  = W'(j);
          ci = 1'(c);
          #1;
          checks++;
          if ({co, s} != (W+1)'(i + j + c)) begin
            failures++;
            $display("FAIL %0d + %0d + %0d -> %0d", i, j, c, {co, s});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
