// tb_dims_full_adder: self-checking test of dims_full_adder.
//
// For every input combination, in random rounds: the inputs become valid in
// a random order; the outputs must stay null until the last input is valid
// and then show the binary sum and carry.  The inputs then return to null in
// random order; the outputs must keep their value until the last input is
// null and then be null.
module tb_dims_full_adder;

  logic [2:0] x_t, x_f;       // a, b, cin
  logic       s_t, s_f, co_t, co_f;
  int         checks = 0, failures = 0;

  dims_full_adder dut (
    .a_t(x_t[2]), .a_f(x_f[2]), .b_t(x_t[1]), .b_f(x_f[1]), .c_t(x_t[0]), .c_f(x_f[0]),
    .s_t, .s_f, .co_t, .co_f);

  task automatic check(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    x_t = '0; x_f = '0;
    #2;
    for (int r = 0; r < 64; r++) begin
      logic [2:0] v;
      logic [1:0] sum;
      int order [3];
      v = 3'(r);
      sum = 2'(v[2]) + 2'(v[1]) + 2'(v[0]);
      order = '{0, 1, 2};
      order.shuffle();
      for (int i = 0; i < 3; i++) begin
        x_t[order[i]] = v[order[i]];
        x_f[order[i]] = ~v[order[i]];
        #1;
        if (i < 2) check({s_t, s_f, co_t, co_f} == 4'b0000, "output null before inputs complete");
      end
      check(s_t == sum[0] && s_f == ~sum[0] && co_t == sum[1] && co_f == ~sum[1],
            $sformatf("sum of %b", v));
      order.shuffle();
      for (int i = 0; i < 3; i++) begin
        x_t[order[i]] = 1'b0;
        x_f[order[i]] = 1'b0;
        #1;
        if (i < 2) check(s_t == sum[0] && co_t == sum[1] && (s_t ^ s_f) && (co_t ^ co_f),
                         "output held while inputs return to null");
      end
      check({s_t, s_f, co_t, co_f} == 4'b0000, "output null after inputs null");
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
