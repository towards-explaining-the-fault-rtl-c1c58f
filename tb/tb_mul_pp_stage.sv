// tb_mul_pp_stage: self-checking test of mul_pp_stage (N = 8).
//
// Stage 0 and stage 5 are driven with random operands and, for stage 5, a
// running sum that is a valid partial result (a * (b mod 2^5)).  Stage 0 must
// output a * b[0]; stage 5 must output acc + (a * b[5] << 5); both must pass
// a and b through and return to null after a spacer.
module tb_mul_pp_stage;

  localparam int unsigned N = 8;
  logic [N-1:0]   a_t, a_f, b_t, b_f;
  logic [2*N-1:0] acc_t, acc_f;
  logic [N-1:0]   ao0_t, ao0_f, bo0_t, bo0_f, ao5_t, ao5_f, bo5_t, bo5_f;
  logic [2*N-1:0] c0_t, c0_f, c5_t, c5_f;
  int             checks = 0, failures = 0;

  mul_pp_stage #(.N(N), .K(0)) dut0 (
    .a_t, .a_f, .b_t, .b_f, .acc_t('0), .acc_f('0),
    .ao_t(ao0_t), .ao_f(ao0_f), .bo_t(bo0_t), .bo_f(bo0_f), .acco_t(c0_t), .acco_f(c0_f));
  mul_pp_stage #(.N(N), .K(5)) dut5 (
    .a_t, .a_f, .b_t, .b_f, .acc_t, .acc_f,
    .ao_t(ao5_t), .ao_f(ao5_f), .bo_t(bo5_t), .bo_f(bo5_f), .acco_t(c5_t), .acco_f(c5_f));

  task automatic check(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    a_t = '0; a_f = '0; b_t = '0; b_f = '0; acc_t = '0; acc_f = '0;
    #2;
    for (int r = 0; r < 150; r++) begin
      logic [N-1:0]   a, b;
      logic [2*N-1:0] acc, e0, e5;
      a = (r == 0) ? '1 : N'($urandom());
      b = (r == 0) ? '1 : N'($urandom());
      acc = (2*N)'(a) * (2*N)'(b & 8'h1f);
      e0  = b[0] ? (2*N)'(a) : '0;
      e5  = acc + (b[5] ? ((2*N)'(a) << 5) : '0);
      a_t = a; a_f = ~a; b_t = b; b_f = ~b; acc_t = acc; acc_f = ~acc;
      #1;
      check(c0_t == e0 && c0_f == ~e0, $sformatf("stage 0: %0d * b0 of %0d", a, b));
      check(c5_t == e5 && c5_f == ~e5, $sformatf("stage 5: a=%0d b=%0d", a, b));
      check(ao5_t == a && bo5_t == b && ao0_f == ~a && bo0_f == ~b, "operands pass through");
      a_t = '0; a_f = '0; b_t = '0; b_f = '0; acc_t = '0; acc_f = '0;
      #1;
      check({c0_t, c0_f, c5_t, c5_f} == '0, "spacer");
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
