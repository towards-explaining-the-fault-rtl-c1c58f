// tb_mul_pipelined: self-checking test of the pipelined multiplier.
//
// Six instances run side by side with N = 8: each of the five buffer styles
// at one operation per stage, and the WCHB at two operations per stage.
// Two more instances use the study's smaller 4-bit width (WCHB at one and
// the interlocking WCHB at two operations per stage).
// Every instance multiplies 24 operand pairs (corner cases and random
// values) with a fast source and a slow sink, so the pipeline fills up
// (bubble-limited operation); the test checks every product and that more
// than one token was in flight at once, i.e. that the stages overlap.
module tb_mul_pipelined;
  import qdi_pkg::*;

  localparam int unsigned N    = 8;
  localparam int unsigned NOPS = 24;
  localparam int unsigned NDUT = 6;
  localparam buf_style_e  STY [NDUT] = '{BUF_WCHB, BUF_INTERLOCKING,
      BUF_DEADLOCKING, BUF_DUALCD, BUF_MTD, BUF_WCHB};
  localparam int unsigned OPSV [NDUT] = '{1, 1, 1, 1, 1, 2};

  logic rst;
  logic done [NDUT];
  int   chk [NDUT], fail [NDUT], ill [NDUT], mif [NDUT], stl [NDUT];
  int   checks, failures;

  localparam int unsigned N4 = 4;
  localparam buf_style_e  STY4 [2] = '{BUF_WCHB, BUF_INTERLOCKING};
  localparam int unsigned OPS4 [2] = '{1, 2};
  logic done4 [2];
  int   chk4 [2], fail4 [2], ill4 [2], mif4 [2], stl4 [2];

  for (genvar d = 0; d < 2; d++) begin : g_n4
    logic [N4-1:0]   a_t, a_f, b_t, b_f;
    logic [2*N4-1:0] p_t, p_f;
    logic            in_ack, out_ack;

    mul_pipelined #(.N(N4), .OPS(OPS4[d]), .STYLE(STY4[d])) u_dut (
      .rst, .in_a_t(a_t), .in_a_f(a_f), .in_b_t(b_t), .in_b_f(b_f),
      .in_ack, .out_p_t(p_t), .out_p_f(p_f), .out_ack);

    tb_mul_driver #(.N(N4), .NOPS(NOPS), .SRC_DLY(1), .SNK_DLY(20), .SEED(d + 31)) u_drv (
      .rst, .a_t, .a_f, .b_t, .b_f, .in_ack, .p_t, .p_f, .out_ack,
      .done(done4[d]), .checks(chk4[d]), .failures(fail4[d]),
      .illegal_codes(ill4[d]), .max_in_flight(mif4[d]), .stalls(stl4[d]));
  end

  for (genvar d = 0; d < NDUT; d++) begin : g_dut
    logic [N-1:0]   a_t, a_f, b_t, b_f;
    logic [2*N-1:0] p_t, p_f;
    logic           in_ack, out_ack;

    mul_pipelined #(.N(N), .OPS(OPSV[d]), .STYLE(STY[d])) u_dut (
      .rst, .in_a_t(a_t), .in_a_f(a_f), .in_b_t(b_t), .in_b_f(b_f),
      .in_ack, .out_p_t(p_t), .out_p_f(p_f), .out_ack);

    tb_mul_driver #(.N(N), .NOPS(NOPS), .SRC_DLY(1), .SNK_DLY(20), .SEED(d + 7)) u_drv (
      .rst, .a_t, .a_f, .b_t, .b_f, .in_ack, .p_t, .p_f, .out_ack,
      .done(done[d]), .checks(chk[d]), .failures(fail[d]),
      .illegal_codes(ill[d]), .max_in_flight(mif[d]), .stalls(stl[d]));
  end

  initial begin
    checks = 0; failures = 0;
    rst = 1'b1;
    #10 rst = 1'b0;
    for (int d = 0; d < NDUT; d++) wait (done[d]);
    for (int d = 0; d < 2; d++) wait (done4[d]);
    for (int d = 0; d < 2; d++) begin
      $display("4-bit dut %0d style %0d ops %0d: products %0d failures %0d illegal %0d max_in_flight %0d",
               d, STY4[d], OPS4[d], chk4[d], fail4[d], ill4[d], mif4[d]);
      checks   += chk4[d] + 2;
      failures += fail4[d];
      if (ill4[d] != 0) failures++;
      if (mif4[d] < 2) failures++;
    end
    for (int d = 0; d < NDUT; d++) begin
      $display("dut %0d style %0d ops %0d: products %0d failures %0d illegal %0d max_in_flight %0d stalls %0d",
               d, STY[d], OPSV[d], chk[d], fail[d], ill[d], mif[d], stl[d]);
      checks   += chk[d] + 2;
      failures += fail[d];
      if (ill[d] != 0) failures++;
      if (mif[d] < 2) failures++;   // the stages must overlap
    end
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
