// tb_qdi_mul_top: end-to-end test of qdi_mul_top at its default parameters
// (8-bit operands, one operation per stage, plain WCHB buffers).
//
// Each of the four multipliers gets its own four-phase driver and checks
// 40 products against integer multiplication:
//   * the pipelined multiplier with a fast source and a slow sink, so that
//     the pipeline runs bubble-limited: the source must stall and several
//     multiplications must be in flight at once;
//   * the iterative multiplier, whose every product needs N trips around
//     its ring: the select token must pick both the input and the feedback
//     path (a zero-delay simulator may merge several passes into one event,
//     so the passes are not counted exactly);
//   * the DD multiplier with transient pulses forced onto signals of one of
//     its two copies, which must all be masked;
//   * the DD iterative multiplier, likewise with pulses on one copy, whose
//     ring must also take both its input and its feedback path.
// Each of these events is counted, and an event that never happens counts
// as a failure.
module tb_qdi_mul_top;
  import qdi_pkg::*;

  localparam int unsigned N    = MUL_WIDTH;
  localparam int unsigned NOPS = 40;

  logic           rst;
  logic [N-1:0]   pa_t, pa_f, pb_t, pb_f, ia_t, ia_f, ib_t, ib_f, da_t, da_f, db_t, db_f;
  logic [2*N-1:0] pp_t, pp_f, ip_t, ip_f, dp_t_a, dp_f_a, dp_t_b, dp_f_b;
  logic           p_in_ack, p_out_ack, i_in_ack, i_out_ack;
  logic           d_ack_a, d_ack_b, d_in_ack, d_out_ack;
  logic           p_done, i_done, d_done;
  int             p_chk, p_fail, p_ill, p_mif, p_stl;
  int             i_chk, i_fail, i_ill, i_mif, i_stl;
  int             d_chk, d_fail, d_ill, d_mif, d_stl;
  logic [N-1:0]   ja_t, ja_f, jb_t, jb_f;
  logic [2*N-1:0] jp_t_a, jp_f_a, jp_t_b, jp_f_b;
  logic           j_ack_a, j_ack_b, j_in_ack, j_out_ack, j_done;
  int             j_chk, j_fail, j_ill, j_mif, j_stl;
  int             jsel_input = 0, jsel_feedback = 0, jdd_pulses = 0, jdd_mismatch = 0;
  int             checks = 0, failures = 0;
  int             sel_input = 0, sel_feedback = 0, dd_pulses = 0, dd_mismatch = 0;

  qdi_mul_top dut (
    .rst,
    .pipe_a_t(pa_t), .pipe_a_f(pa_f), .pipe_b_t(pb_t), .pipe_b_f(pb_f),
    .pipe_in_ack(p_in_ack), .pipe_p_t(pp_t), .pipe_p_f(pp_f), .pipe_out_ack(p_out_ack),
    .iter_a_t(ia_t), .iter_a_f(ia_f), .iter_b_t(ib_t), .iter_b_f(ib_f),
    .iter_in_ack(i_in_ack), .iter_p_t(ip_t), .iter_p_f(ip_f), .iter_out_ack(i_out_ack),
    .dd_a_t_a(da_t), .dd_a_f_a(da_f), .dd_b_t_a(db_t), .dd_b_f_a(db_f),
    .dd_a_t_b(da_t), .dd_a_f_b(da_f), .dd_b_t_b(db_t), .dd_b_f_b(db_f),
    .dd_in_ack_a(d_ack_a), .dd_in_ack_b(d_ack_b),
    .dd_p_t_a(dp_t_a), .dd_p_f_a(dp_f_a), .dd_p_t_b(dp_t_b), .dd_p_f_b(dp_f_b),
    .dd_out_ack_a(d_out_ack), .dd_out_ack_b(d_out_ack),
    .iterdd_a_t_a(ja_t), .iterdd_a_f_a(ja_f), .iterdd_b_t_a(jb_t), .iterdd_b_f_a(jb_f),
    .iterdd_a_t_b(ja_t), .iterdd_a_f_b(ja_f), .iterdd_b_t_b(jb_t), .iterdd_b_f_b(jb_f),
    .iterdd_in_ack_a(j_ack_a), .iterdd_in_ack_b(j_ack_b),
    .iterdd_p_t_a(jp_t_a), .iterdd_p_f_a(jp_f_a), .iterdd_p_t_b(jp_t_b), .iterdd_p_f_b(jp_f_b),
    .iterdd_out_ack_a(j_out_ack), .iterdd_out_ack_b(j_out_ack));

  tb_mul_driver #(.N(N), .NOPS(NOPS), .SRC_DLY(1), .SNK_DLY(25), .SEED(21)) u_pdrv (
    .rst, .a_t(pa_t), .a_f(pa_f), .b_t(pb_t), .b_f(pb_f), .in_ack(p_in_ack),
    .p_t(pp_t), .p_f(pp_f), .out_ack(p_out_ack), .done(p_done),
    .checks(p_chk), .failures(p_fail), .illegal_codes(p_ill), .max_in_flight(p_mif), .stalls(p_stl));

  tb_mul_driver #(.N(N), .NOPS(NOPS), .SRC_DLY(2), .SNK_DLY(2), .SEED(22)) u_idrv (
    .rst, .a_t(ia_t), .a_f(ia_f), .b_t(ib_t), .b_f(ib_f), .in_ack(i_in_ack),
    .p_t(ip_t), .p_f(ip_f), .out_ack(i_out_ack), .done(i_done),
    .checks(i_chk), .failures(i_fail), .illegal_codes(i_ill), .max_in_flight(i_mif), .stalls(i_stl));

  c_element u_dd_join (.rst(rst), .in({d_ack_a, d_ack_b}), .out(d_in_ack));

  tb_mul_driver #(.N(N), .NOPS(NOPS), .SRC_DLY(1), .SNK_DLY(6), .SEED(23)) u_ddrv (
    .rst, .a_t(da_t), .a_f(da_f), .b_t(db_t), .b_f(db_f), .in_ack(d_in_ack),
    .p_t(dp_t_a), .p_f(dp_f_a), .out_ack(d_out_ack), .done(d_done),
    .checks(d_chk), .failures(d_fail), .illegal_codes(d_ill), .max_in_flight(d_mif), .stalls(d_stl));

  c_element u_jdd_join (.rst(rst), .in({j_ack_a, j_ack_b}), .out(j_in_ack));

  tb_mul_driver #(.N(N), .NOPS(NOPS), .SRC_DLY(2), .SNK_DLY(3), .SEED(24)) u_jdrv (
    .rst, .a_t(ja_t), .a_f(ja_f), .b_t(jb_t), .b_f(jb_f), .in_ack(j_in_ack),
    .p_t(jp_t_a), .p_f(jp_f_a), .out_ack(j_out_ack), .done(j_done),
    .checks(j_chk), .failures(j_fail), .illegal_codes(j_ill), .max_in_flight(j_mif), .stalls(j_stl));

  // DD iterative multiplier: selections, copy agreement, pulses on copy A.
  always @(posedge dut.u_iterdd.sel_f[1]) if (!rst) jsel_input++;
  always @(posedge dut.u_iterdd.sel_t[1]) if (!rst) jsel_feedback++;
  always @(jp_t_a or jp_f_a)
    if (!rst && (jp_t_a ^ jp_f_a) == '1 && (jp_t_b !== jp_t_a || jp_f_b !== jp_f_a)) jdd_mismatch++;

  initial begin
    @(negedge rst);
    repeat (15) begin
      #(5 + $urandom_range(0, 9));
      force dut.u_iterdd.g_copy[0].u_step.pp_f[3] = 1'b1;
      #2 release dut.u_iterdd.g_copy[0].u_step.pp_f[3];
      jdd_pulses++;
      #(4 + $urandom_range(0, 9));
      force dut.u_iterdd.f_in_t[0][2*N+1] = 1'b1;
      #2 release dut.u_iterdd.f_in_t[0][2*N+1];
      jdd_pulses++;
    end
  end

  // Iterative multiplier: which source the merge selected.
  always @(posedge dut.u_iter.sel_f) if (!rst) sel_input++;
  always @(posedge dut.u_iter.sel_t) if (!rst) sel_feedback++;

  // DD multiplier: the two output copies must agree; pulses on copy A.
  always @(dp_t_a or dp_f_a)
    if (!rst && (dp_t_a ^ dp_f_a) == '1 && (dp_t_b !== dp_t_a || dp_f_b !== dp_f_a)) dd_mismatch++;

  initial begin
    @(negedge rst);
    repeat (15) begin
      #(6 + $urandom_range(0, 9));
      force dut.u_dd.g_stage[2].g_copy[0].u_logic.pp_f[4] = 1'b1;
      #2 release dut.u_dd.g_stage[2].g_copy[0].u_logic.pp_f[4];
      dd_pulses++;
      #(4 + $urandom_range(0, 9));
      force dut.u_dd.p_t[0][6][2*N+3] = 1'b1;
      #2 release dut.u_dd.p_t[0][6][2*N+3];
      dd_pulses++;
    end
  end

  task automatic expect_event(input int count, input string what);
    checks++;
    $display("  %-40s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    rst = 1'b1;
    #10 rst = 1'b0;
    wait (p_done && i_done && d_done && j_done);
    #5;
    $display("pipelined: products %0d failures %0d illegal %0d", p_chk, p_fail, p_ill);
    $display("iterative: products %0d failures %0d illegal %0d", i_chk, i_fail, i_ill);
    $display("dd:        products %0d failures %0d illegal %0d copy mismatches %0d",
             d_chk, d_fail, d_ill, dd_mismatch);
    $display("dd iter:   products %0d failures %0d illegal %0d copy mismatches %0d",
             j_chk, j_fail, j_ill, jdd_mismatch);
    checks   += p_chk + i_chk + d_chk + j_chk + 6;
    failures += p_fail + i_fail + d_fail + j_fail;
    failures += (p_ill != 0) + (i_ill != 0) + (d_ill != 0) + (dd_mismatch != 0);
    failures += (j_ill != 0) + (jdd_mismatch != 0);
    $display("events:");
    expect_event(p_stl, "pipelined source stalled (back-pressure)");
    expect_event(p_mif > 1 ? p_mif : 0, "pipelined tokens in flight at once");
    expect_event(sel_input, "iterative merge took the input channel");
    expect_event(sel_feedback, "iterative merge took the feedback path");
    expect_event(dd_pulses, "transient pulses masked by the DD copies");
    expect_event(jsel_input, "DD iterative merge took the input channel");
    expect_event(jsel_feedback, "DD iterative merge took the feedback path");
    expect_event(jdd_pulses, "pulses masked by the DD iterative copies");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
