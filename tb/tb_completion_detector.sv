// tb_completion_detector: self-checking test of completion_detector (W = 8).
//
// Each round makes the bits of a random word valid one at a time in random
// order, checking that done stays low until the last bit is valid, then
// returns them to null one at a time, checking that done stays high until
// the last bit is null.
module tb_completion_detector;

  localparam int unsigned W = 8;
  logic [W-1:0] in_t, in_f;
  logic         done;
  int           checks = 0, failures = 0;

  completion_detector #(.W(W)) dut (.in_t, .in_f, .done);

  task automatic check(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    in_t = '0; in_f = '0;
    #2;
    check(!done, "null word");
    for (int r = 0; r < 30; r++) begin
      logic [W-1:0] v;
      int order [W];
      v = W'($urandom());
      for (int i = 0; i < int'(W); i++) order[i] = i;
      order.shuffle();
      for (int i = 0; i < int'(W); i++) begin
        in_t[order[i]] = v[order[i]];
        in_f[order[i]] = ~v[order[i]];
        #1;
        check(done == (i == int'(W) - 1), "rising phase");
      end
      order.shuffle();
      for (int i = 0; i < int'(W); i++) begin
        in_t[order[i]] = 1'b0;
        in_f[order[i]] = 1'b0;
        #1;
        check(done == (i != int'(W) - 1), "falling phase");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
