// tb_mul_pipelined_dd: self-checking test of the DD pipelined multiplier.
//
// N = 8, OPS = 1.  Both input copies are driven with the same 24 operand
// pairs (corner cases and random values) by one four-phase driver; both
// output copies are acknowledged together and compared.  While the products
// stream through, transient pulses are forced onto signals of copy A only
// (a partial-product rail inside a stage's logic and a stored rail's input
// inside a buffer).  Every product must still be correct in both copies and
// no illegal code may appear at the output.
module tb_mul_pipelined_dd;

  localparam int unsigned N    = 8;
  localparam int unsigned NOPS = 24;

  logic           rst;
  logic [N-1:0]   a_t, a_f, b_t, b_f;
  logic [2*N-1:0] pa_t, pa_f, pb_t, pb_f;
  logic           ack_a, ack_b, in_ack, out_ack, done;
  int             chk, fail, ill, mif, stl;
  int             checks = 0, failures = 0, pulses = 0, mismatches = 0;

  mul_pipelined_dd #(.N(N), .OPS(1)) u_dut (
    .rst,
    .in_a_t_a(a_t), .in_a_f_a(a_f), .in_b_t_a(b_t), .in_b_f_a(b_f),
    .in_a_t_b(a_t), .in_a_f_b(a_f), .in_b_t_b(b_t), .in_b_f_b(b_f),
    .in_ack_a(ack_a), .in_ack_b(ack_b),
    .out_p_t_a(pa_t), .out_p_f_a(pa_f), .out_p_t_b(pb_t), .out_p_f_b(pb_f),
    .out_ack_a(out_ack), .out_ack_b(out_ack));

  // Four-phase join of the two input acknowledges.
  c_element u_join (.rst(rst), .in({ack_a, ack_b}), .out(in_ack));

  tb_mul_driver #(.N(N), .NOPS(NOPS), .SRC_DLY(1), .SNK_DLY(6), .SEED(11)) u_drv (
    .rst, .a_t, .a_f, .b_t, .b_f, .in_ack, .p_t(pa_t), .p_f(pa_f), .out_ack,
    .done, .checks(chk), .failures(fail), .illegal_codes(ill),
    .max_in_flight(mif), .stalls(stl));

  // Copy B must agree with copy A whenever copy A's product is complete.
  always @(pa_t or pa_f)
    if (!rst && (pa_t ^ pa_f) == '1 && (pb_t !== pa_t || pb_f !== pa_f)) mismatches++;

  // Transient pulses on copy A.
  initial begin
    @(negedge rst);
    repeat (12) begin
      #(7 + $urandom_range(0, 9));
      force u_dut.g_stage[3].g_copy[0].u_logic.pp_t[2] = 1'b1;
      #2 release u_dut.g_stage[3].g_copy[0].u_logic.pp_t[2];
      pulses++;
      #(5 + $urandom_range(0, 9));
      force u_dut.p_f[0][5][N+1] = 1'b1;
      #2 release u_dut.p_f[0][5][N+1];
      pulses++;
    end
  end

  initial begin
    rst = 1'b1;
    #10 rst = 1'b0;
    wait (done);
    #5;
    $display("products %0d failures %0d illegal %0d mismatches %0d pulses %0d", chk, fail, ill, mismatches, pulses);
    checks   = chk + 3;
    failures = fail + (ill != 0) + (mismatches != 0) + (pulses == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
