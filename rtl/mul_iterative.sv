// mul_iterative: N x N bit iterative shift-and-add multiplier in dual-rail
// four-phase (QDI) logic, computing the partial products in a ring.
//
// Data ring: merge -> buffer B1 -> add/shift logic (mul_iter_step) -> buffer
// B2 -> split -> buffer B3 -> back to the merge.  One multiplication is one
// token that goes N times around the ring; the split sends it back (marker
// bit 0 low) or, after the last pass (marker bit 0 high), sends its product
// p to the output buffer BO.  Control ring: the marker bit that drives the
// split is also inverted into a one-bit select token, held in buffer S, that
// tells the merge whether its next token comes from the feedback path
// (sel = 1) or from the input channel (sel = 0).  S resets holding sel = 0,
// so the first token is taken from the input.  B2's acknowledge joins the
// split side and S with a C-element.  Three half buffers in each ring leave
// room for the one token plus its spacer.
//
// Interface as mul_pipelined: operands in (in_a, in_b, in_ack), product out
// (out_p, out_ack), four-phase, no clock, rst empties the buffers and puts
// the initial select token into S.  Every buffer is of style STYLE.
//
// Following the source: a ring that reuses one partial-product/adder stage,
// a control part driving it, the buffer styles and DIMS logic.  This
// design's own: the merge/split/select structure, the number and place of
// the buffers and the token format (the source describes the ring only by
// its function).
//
// Tool notes: besides the handshake loops of every buffer, the data and
// select rings are loops by construction.  Linters report them as circular
// combinational logic (e.g. on B1's acknowledge); intended.
module mul_iterative
  import qdi_pkg::*;
#(
  parameter int unsigned N     = MUL_WIDTH,
  parameter buf_style_e  STYLE = BUF_WCHB
) (
  input  logic           rst,
  input  logic [N-1:0]   in_a_t, in_a_f,
  input  logic [N-1:0]   in_b_t, in_b_f,
  output logic           in_ack,
  output logic [2*N-1:0] out_p_t, out_p_f,
  input  logic           out_ack
);

  localparam int unsigned TW = 5 * N;
  localparam int unsigned M0 = 4 * N;   // position of marker bit 0 in a token

  logic [TW-1:0]  x_t, x_f, x1_t, x1_f, xs_t, xs_f, y_t, y_f;
  logic [TW-1:0]  f_in_t, f_in_f, fb_t, fb_f;
  logic [2*N-1:0] o_in_t, o_in_f;
  logic           b1_ack, b2_ack, b3_ack, bo_ack, s_ack, fb_ack, sel_ack;
  logic           sel_t, sel_f, split_ack, b2_ack_in;

  mul_iter_merge #(.N(N)) u_merge (
    .rst, .in_a_t, .in_a_f, .in_b_t, .in_b_f, .in_ack,
    .fb_t, .fb_f, .fb_ack, .sel_t, .sel_f, .sel_ack,
    .x_t, .x_f, .x_ack(b1_ack));

  qdi_buffer #(.STYLE(STYLE), .W(TW)) u_b1 (
    .rst, .in_t(x_t), .in_f(x_f), .ack_out(b1_ack),
    .out_t(x1_t), .out_f(x1_f), .ack_in(b2_ack));

  mul_iter_step #(.N(N)) u_step (
    .x_t(x1_t), .x_f(x1_f), .y_t(xs_t), .y_f(xs_f));

  qdi_buffer #(.STYLE(STYLE), .W(TW)) u_b2 (
    .rst, .in_t(xs_t), .in_f(xs_f), .ack_out(b2_ack),
    .out_t(y_t), .out_f(y_f), .ack_in(b2_ack_in));

  // Split on marker bit 0: high after the N-th pass.
  for (genvar i = 0; i < TW; i++) begin : g_split_fb
    c_element u_t (.rst(1'b0), .in({y_t[i], y_f[M0]}), .out(f_in_t[i]));
    c_element u_f (.rst(1'b0), .in({y_f[i], y_f[M0]}), .out(f_in_f[i]));
  end
  for (genvar i = 0; i < 2*N; i++) begin : g_split_out
    c_element u_t (.rst(1'b0), .in({y_t[2*N+i], y_t[M0]}), .out(o_in_t[i]));
    c_element u_f (.rst(1'b0), .in({y_f[2*N+i], y_t[M0]}), .out(o_in_f[i]));
  end
  // Only one side of the split is active per token.
  assign split_ack = b3_ack | bo_ack;

  // Resets high: S starts out holding a token that B2 has not sent, so B2
  // must first see S consumed (s_ack low) before it may deliver a new select.
  c_element #(.N(2), .RST_VAL(1'b1)) u_b2_join (
    .rst(rst), .in({split_ack, s_ack}), .out(b2_ack_in));

  // Select token: continue looping (1) unless this was the last pass.
  qdi_buffer #(.STYLE(STYLE), .W(1), .RST_T(1'b0), .RST_F(1'b1)) u_s (
    .rst, .in_t(y_f[M0]), .in_f(y_t[M0]), .ack_out(s_ack),
    .out_t(sel_t), .out_f(sel_f), .ack_in(sel_ack));

  qdi_buffer #(.STYLE(STYLE), .W(TW)) u_b3 (
    .rst, .in_t(f_in_t), .in_f(f_in_f), .ack_out(b3_ack),
    .out_t(fb_t), .out_f(fb_f), .ack_in(fb_ack));

  qdi_buffer #(.STYLE(STYLE), .W(2*N)) u_bo (
    .rst, .in_t(o_in_t), .in_f(o_in_f), .ack_out(bo_ack),
    .out_t(out_p_t), .out_f(out_p_f), .ack_in(out_ack));

endmodule
