// mul5_top_tb: end-to-end test of both multipliers in mul5_top at their
// default parameters.
//
// Phase 1 replays the document's 15-vector test: ten products taken at
// random (-36, -96, 110, -117, 26, 16, -3, 13, -16, 84) and five directed
// pairs (0*0, 1*3, 2*6, 3*3, 8*2). Only the products of the random ten are
// known, so for each the testbench searches the signed 5-bit range for an
// operand pair with that product and applies it. Phase 2 streams all 1024
// pairs into the simple pipeline and, in reverse order, into the optimized
// one, back to back. Phase 3 resets both in the middle of a random stream and
// checks that they refill. Every output is compared, on every cycle, with the
// product of the pair sampled three rising edges earlier.
//
// Mechanisms counted (each must occur): cycles with three operations in
// flight in both pipelines, negative products, the most negative operand
// (-16) on either side, a reset with operations in flight followed by a
// correct refill, and the document's vectors matching their expected results.
module mul5_top_tb;
  logic       clk = 0, rst_n = 1;
  logic [4:0] a = '0, b = '0, a_opt = '0, b_opt = '0;
  logic [9:0] s, s_opt;
  int         checks = 0, failures = 0;

  int n_overlap = 0, n_negative = 0, n_min_operand = 0, n_reset_refill = 0, n_doc_vectors = 0;
  bit reset_pending = 0;

  mul5_top dut (.clk, .rst_n, .a, .b, .s, .a_opt, .b_opt, .s_opt);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sampled pairs, newest first, and whether each is a document vector
  logic signed [4:0] ha [3], hb [3], hao [3], hbo [3];
  logic              hv [3], hdoc [3];
  logic              doc_now = 1'b0;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) begin hv[i] <= 1'b0; hdoc[i] <= 1'b0; end
    end else begin
      ha[0] <= a;  hb[0] <= b;  hao[0] <= a_opt;  hbo[0] <= b_opt;
      hv[0] <= 1'b1;  hdoc[0] <= doc_now;
      for (int i = 1; i < 3; i++) begin
        ha[i] <= ha[i-1];  hb[i] <= hb[i-1];  hao[i] <= hao[i-1];  hbo[i] <= hbo[i-1];
        hv[i] <= hv[i-1];  hdoc[i] <= hdoc[i-1];
      end
    end
  end

  task automatic check_out();
    int e, eo, ps, pso;
    if (!hv[2]) return;
    ps  = int'($signed(s));
    pso = int'($signed(s_opt));
    if (hv[0] && hv[1]) n_overlap++;
    e  = int'(ha[2]) * int'(hb[2]);
    eo = int'(hao[2]) * int'(hbo[2]);
    checks += 2;
    if (ps != e) begin
      failures++;
      if (failures < 10) $display("FAIL simple %0d*%0d: s=%0d", ha[2], hb[2], ps);
    end
    if (pso != eo) begin
      failures++;
      if (failures < 10) $display("FAIL optimized %0d*%0d: s_opt=%0d", hao[2], hbo[2], pso);
    end
    if (e < 0 && ps == e) n_negative++;
    if ((ha[2] == -16 || hb[2] == -16) && ps == e) n_min_operand++;
    if (hdoc[2] && ps == e && pso == e) n_doc_vectors++;
    if (reset_pending && ps == e && pso == eo) begin
      n_reset_refill++;
      reset_pending = 0;
    end
  endtask

  task automatic step(input int av, input int bv, input int aov, input int bov, input bit doc);
    @(negedge clk);
    check_out();
    a = 5'(av);  b = 5'(bv);  a_opt = 5'(aov);  b_opt = 5'(bov);
    doc_now = doc;
  endtask

  // expected products of the document's vector set, random ten first
  int doc_prod [15] = '{-36, -96, 110, -117, 26, 16, -3, 13, -16, 84, 0, 3, 12, 9, 16};
  int doc_a    [5]  = '{0, 1, 2, 3, 8};
  int doc_b    [5]  = '{0, 3, 6, 3, 2};

  initial begin
    int fa, fb;
    bit found;
    #1 rst_n = 0;
    @(negedge clk) rst_n = 1;

    // phase 1: the document's vector set, applied to both pipelines
    for (int v = 0; v < 15; v++) begin
      if (v < 10) begin
        found = 0;
        for (int x = -16; x < 16 && !found; x++)
          for (int y = -16; y < 16 && !found; y++)
            if (x * y == doc_prod[v]) begin fa = x; fb = y; found = 1; end
        if (!found) begin failures++; $display("FAIL no operand pair for %0d", doc_prod[v]); end
      end else begin
        fa = doc_a[v-10];
        fb = doc_b[v-10];
        checks++;
        if (fa * fb != doc_prod[v]) begin failures++; $display("FAIL vector table %0d", v); end
      end
      step(fa, fb, fa, fb, 1'b1);
    end

    // phase 2: all pairs, back to back
    for (int i = 0; i < 1024; i++)
      step(i & 31, i >> 5, (1023 - i) & 31, (1023 - i) >> 5, 1'b0);

    // phase 3: reset with operations in flight, then refill
    repeat (20) step(int'($urandom), int'($urandom), int'($urandom), int'($urandom), 1'b0);
    #2 rst_n = 0;
    reset_pending = 1;
    @(negedge clk) rst_n = 1;
    repeat (20) step(int'($urandom), int'($urandom), int'($urandom), int'($urandom), 1'b0);
    repeat (3) begin @(negedge clk) check_out(); end

    $display("overlap=%0d negative=%0d min_operand=%0d reset_refill=%0d doc_vectors=%0d",
             n_overlap, n_negative, n_min_operand, n_reset_refill, n_doc_vectors);
    checks += 5;
    if (n_overlap == 0)      begin failures++; $display("FAIL never three in flight"); end
    if (n_negative == 0)     begin failures++; $display("FAIL no negative product"); end
    if (n_min_operand == 0)  begin failures++; $display("FAIL no -16 operand"); end
    if (n_reset_refill == 0) begin failures++; $display("FAIL no reset refill"); end
    if (n_doc_vectors != 15) begin failures++; $display("FAIL document vectors: %0d of 15", n_doc_vectors); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
