// tb_pred_fsm: walks the 1-bit and 2-bit predictors through every state and
// outcome and compares with the state diagrams: last outcome for one bit; a
// counter saturating at 0 and 3, predicting taken in states 2 and 3, for two.
// Also replays the inner/outer loop pattern: the 1-bit scheme mispredicts the
// inner branch twice per pass, the 2-bit scheme once.
module tb_pred_fsm;
  logic       s1, n1, p1, t;
  logic [1:0] s2, n2;
  logic       p2;
  int checks = 0, failures = 0;
  pred_fsm #(.BITS(1)) u1 (.state(s1), .taken(t), .next_state(n1), .predict_taken(p1));
  pred_fsm #(.BITS(2)) u2 (.state(s2), .taken(t), .next_state(n2), .predict_taken(p2));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int miss1 = 0, miss2 = 0;
    for (int s = 0; s < 2; s++) for (int o = 0; o < 2; o++) begin
      s1 = 1'(s); t = 1'(o); #1;
      chk(n1 == 1'(o), "1-bit next state is the outcome");
      chk(p1 == 1'(s), "1-bit predicts its state");
    end
    for (int s = 0; s < 4; s++) for (int o = 0; o < 2; o++) begin
      s2 = 2'(s); t = 1'(o); #1;
      chk(n2 == 2'(o ? (s == 3 ? 3 : s + 1) : (s == 0 ? 0 : s - 1)), $sformatf("2-bit state %0d outcome %0d", s, o));
      chk(p2 == (s >= 2), "2-bit predicts taken in states 2 and 3");
    end
    // inner loop of 4 passes, run 5 times; both start predicting taken
    s1 = 1; s2 = 2;
    for (int outer = 0; outer < 5; outer++) begin
      for (int k = 0; k < 4; k++) begin
        t = (k != 3); #1;
        if (p1 != t) miss1++;
        if (p2 != t) miss2++;
        s1 = n1; s2 = n2; #1;
      end
    end
    chk(miss1 == 9, $sformatf("1-bit misses %0d, expected 9 (1 + 2 per later pass)", miss1));
    chk(miss2 == 5, $sformatf("2-bit misses %0d, expected 5 (1 per pass)", miss2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
