// mul_pipelined: N x N bit linear-pipeline shift-and-add multiplier in
// dual-rail four-phase (QDI) logic.
//
// Stage k (k = 0 .. N-1) consists of a pipeline buffer followed by the
// mul_pp_stage logic that adds a & b[k], shifted by k, to the running sum.
// After the last stage an output buffer holds the 2N-bit product, so the
// circuit has N+1 buffers and N tokens (multiplications) can be in flight at
// once.  With OPS (operations per stage) above 1 only every OPS-th stage
// keeps its buffer; the logic of the stages in between is chained directly,
// so the buffer count drops while the logic is unchanged.
//
// Buffer 0 stores the operands {b, a} (2N bits); the later buffers store
// {acc, b, a} (4N bits); the output buffer stores the product (2N bits).
// Every buffer is a qdi_buffer of style STYLE.  The input channel (in_a,
// in_b, in_ack) and the output channel (out_p, out_ack) follow the
// four-phase protocol: the environment presents a complete data token,
// waits for in_ack to rise, returns the rails to null and waits for in_ack
// to fall; at the output it raises out_ack after taking a product and lowers
// it after seeing the spacer.  There is no clock; rst empties all buffers.
//
// Following the source: one partial product per stage, N stages plus one
// output buffer, the OPS parameter, the buffer styles, DIMS logic with
// ripple-carry adders.  This design's own: the buffer contents listed above
// and the reset.  All loops in the netlist are the acknowledge loops of the
// handshakes; they are intended.
module mul_pipelined
  import qdi_pkg::*;
#(
  parameter int unsigned N     = MUL_WIDTH,
  parameter int unsigned OPS   = 1,
  parameter buf_style_e  STYLE = BUF_WCHB
) (
  input  logic           rst,
  input  logic [N-1:0]   in_a_t, in_a_f,
  input  logic [N-1:0]   in_b_t, in_b_f,
  output logic           in_ack,
  output logic [2*N-1:0] out_p_t, out_p_f,
  input  logic           out_ack
);

  // Dual-rail token at the input of stage k (before its buffer) and after
  // its buffer (the input of its logic).  Index N is the output buffer.
  logic [N-1:0]   pa_t [N+1], pa_f [N+1], pb_t [N+1], pb_f [N+1];
  logic [2*N-1:0] pc_t [N+1], pc_f [N+1];
  logic [N-1:0]   qa_t [N],   qa_f [N],   qb_t [N],   qb_f [N];
  logic [2*N-1:0] qc_t [N],   qc_f [N];
  // ack_out of the buffer at position k (only defined where one exists).
  logic           back [N+1];

  assign pa_t[0] = in_a_t;
  assign pa_f[0] = in_a_f;
  assign pb_t[0] = in_b_t;
  assign pb_f[0] = in_b_f;
  assign pc_t[0] = '0;   // stage 0 has no running sum
  assign pc_f[0] = '0;
  assign in_ack  = back[0];

  for (genvar k = 0; k < N; k++) begin : g_stage
    localparam int unsigned NEXT = (k + OPS < N) ? k + OPS : N;

    if (k == 0) begin : g_buf0
      qdi_buffer #(.STYLE(STYLE), .W(2*N)) u_buf (
        .rst     (rst),
        .in_t    ({pb_t[k], pa_t[k]}),
        .in_f    ({pb_f[k], pa_f[k]}),
        .ack_out (back[k]),
        .out_t   ({qb_t[k], qa_t[k]}),
        .out_f   ({qb_f[k], qa_f[k]}),
        .ack_in  (back[NEXT]));
      assign qc_t[k] = '0;
      assign qc_f[k] = '0;
    end else if (k % OPS == 0) begin : g_buf
      qdi_buffer #(.STYLE(STYLE), .W(4*N)) u_buf (
        .rst     (rst),
        .in_t    ({pc_t[k], pb_t[k], pa_t[k]}),
        .in_f    ({pc_f[k], pb_f[k], pa_f[k]}),
        .ack_out (back[k]),
        .out_t   ({qc_t[k], qb_t[k], qa_t[k]}),
        .out_f   ({qc_f[k], qb_f[k], qa_f[k]}),
        .ack_in  (back[NEXT]));
    end else begin : g_wire
      // OPS > 1: this buffer is removed, its input wired to its output.
      assign {qc_t[k], qb_t[k], qa_t[k]} = {pc_t[k], pb_t[k], pa_t[k]};
      assign {qc_f[k], qb_f[k], qa_f[k]} = {pc_f[k], pb_f[k], pa_f[k]};
      assign back[k] = 1'b0;
    end

    mul_pp_stage #(.N(N), .K(k)) u_logic (
      .a_t    (qa_t[k]),   .a_f    (qa_f[k]),
      .b_t    (qb_t[k]),   .b_f    (qb_f[k]),
      .acc_t  (qc_t[k]),   .acc_f  (qc_f[k]),
      .ao_t   (pa_t[k+1]), .ao_f   (pa_f[k+1]),
      .bo_t   (pb_t[k+1]), .bo_f   (pb_f[k+1]),
      .acco_t (pc_t[k+1]), .acco_f (pc_f[k+1]));
  end

  qdi_buffer #(.STYLE(STYLE), .W(2*N)) u_out_buf (
    .rst     (rst),
    .in_t    (pc_t[N]),
    .in_f    (pc_f[N]),
    .ack_out (back[N]),
    .out_t   (out_p_t),
    .out_f   (out_p_f),
    .ack_in  (out_ack));

endmodule
