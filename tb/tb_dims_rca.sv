// tb_dims_rca: self-checking test of dims_rca (W = 8).
//
// Random operand pairs plus corner cases are applied as complete dual-rail
// words separated by spacers.  The sum and carry are compared with integer
// addition; the outputs must be complete code words when the inputs are, and
// all null after the spacer.  One round also checks that the adder output is
// not complete while one operand bit is still null.
module tb_dims_rca;

  localparam int unsigned W = 8;
  logic [W-1:0] a_t, a_f, b_t, b_f, s_t, s_f;
  logic         co_t, co_f;
  int           checks = 0, failures = 0;

  dims_rca #(.W(W)) dut (.a_t, .a_f, .b_t, .b_f, .s_t, .s_f, .co_t, .co_f);

  task automatic check(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    a_t = '0; a_f = '0; b_t = '0; b_f = '0;
    #2;
    for (int r = 0; r < 200; r++) begin
      logic [W-1:0] a, b;
      logic [W:0]   sum;
      a = (r == 0) ? '1 : (r == 1) ? '0 : W'($urandom());
      b = (r == 0) ? '1 : (r == 1) ? '1 : W'($urandom());
      sum = (W+1)'(a) + (W+1)'(b);
      a_t = a; a_f = ~a; b_t = b; b_f = ~b;
      if (r == 2) begin
        b_t[0] = 1'b0; b_f[0] = 1'b0;
        #1;
        check(((s_t ^ s_f) != '1) || !(co_t ^ co_f), "incomplete input gives incomplete output");
        b_t[0] = b[0]; b_f[0] = ~b[0];
      end
      #1;
      check({co_t, s_t} == sum && {co_f, s_f} == ~sum, $sformatf("%0d + %0d", a, b));
      a_t = '0; a_f = '0; b_t = '0; b_f = '0;
      #1;
      check({co_t, co_f, s_t, s_f} == '0, "spacer");
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
