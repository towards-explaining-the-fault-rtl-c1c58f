// tb_mul_iterative: self-checking test of the iterative (ring) multiplier.
//
// Five instances run side by side with N = 8, one per buffer style.  Each
// multiplies 24 operand pairs (corner cases and random values) and every
// product is checked; a product is only right after exactly N passes around
// the ring.  The test also watches the select token and requires that the
// merge took both the input channel and the feedback path.  The ring holds
// a single multiplication and the output buffer one more product, so at most
// two tokens may be in flight at once.
module tb_mul_iterative;
  import qdi_pkg::*;

  localparam int unsigned N    = 8;
  localparam int unsigned NOPS = 24;
  localparam int unsigned NDUT = 5;
  localparam buf_style_e  STY [NDUT] = '{BUF_WCHB, BUF_INTERLOCKING,
      BUF_DEADLOCKING, BUF_DUALCD, BUF_MTD};

  logic rst;
  logic done [NDUT];
  int   chk [NDUT], fail [NDUT], ill [NDUT], mif [NDUT], stl [NDUT], sin [NDUT], sfb [NDUT];
  int   checks, failures;

  for (genvar d = 0; d < NDUT; d++) begin : g_dut
    logic [N-1:0]   a_t, a_f, b_t, b_f;
    logic [2*N-1:0] p_t, p_f;
    logic           in_ack, out_ack;

    mul_iterative #(.N(N), .STYLE(STY[d])) u_dut (
      .rst, .in_a_t(a_t), .in_a_f(a_f), .in_b_t(b_t), .in_b_f(b_f),
      .in_ack, .out_p_t(p_t), .out_p_f(p_f), .out_ack);

    tb_mul_driver #(.N(N), .NOPS(NOPS), .SRC_DLY(1), .SNK_DLY(5), .SEED(d + 3)) u_drv (
      .rst, .a_t, .a_f, .b_t, .b_f, .in_ack, .p_t, .p_f, .out_ack,
      .done(done[d]), .checks(chk[d]), .failures(fail[d]),
      .illegal_codes(ill[d]), .max_in_flight(mif[d]), .stalls(stl[d]));

    // Passes around the ring, by the source the merge selected.
    initial begin sin[d] = 0; sfb[d] = 0; end
    always @(posedge u_dut.sel_f) if (!rst) sin[d]++;
    always @(posedge u_dut.sel_t) if (!rst) sfb[d]++;
  end

  initial begin
    checks = 0; failures = 0;
    rst = 1'b1;
    #10 rst = 1'b0;
    for (int d = 0; d < NDUT; d++) wait (done[d]);
    for (int d = 0; d < NDUT; d++) begin
      $display("dut %0d style %0d: products %0d failures %0d illegal %0d max_in_flight %0d input %0d feedback %0d",
               d, STY[d], chk[d], fail[d], ill[d], mif[d], sin[d], sfb[d]);
      checks   += chk[d] + 4;
      if (sin[d] == 0) failures++;
      if (sfb[d] == 0) failures++;
      failures += fail[d];
      if (ill[d] != 0) failures++;
      if (mif[d] > 2) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
