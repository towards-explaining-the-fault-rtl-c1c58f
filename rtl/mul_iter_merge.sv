// mul_iter_merge: select-controlled merge at the head of the iterative
// multiplier's ring.
//
// A one-bit dual-rail select token sel chooses the source of the next ring
// token x.  sel = 0 takes a new operand pair from the input channel and
// builds the initial token {mark = 0..01, p = 0, b, a}; sel = 1 takes the
// token coming back around the ring on fb.  Each output rail is the OR of
// two C-elements, (input-side rail, sel.f) and (feedback rail, sel.t), so a
// rail rises only for the selected source and falls only once both that
// source and sel have returned to null.  The constant fields of the initial
// token take their validity from bit 0 of operand a.
//
// Acknowledges: x_ack (from the ring buffer that takes x) reaches the
// selected data channel through a C-element with the matching select rail,
// so the unselected channel never sees an acknowledge.  The select channel
// is acknowledged by the OR of the two data acknowledges, i.e. only after
// the data channel's C-element has fired: acknowledging sel directly with
// x_ack would let sel return to null before that C-element sees it.
// Token layout, LSB first: a[N], b[N], p[2N], mark[N].
// rst clears every C-element.  The merge/select arrangement is this design's
// own: the source describes the ring only by its function.
module mul_iter_merge #(
  parameter int unsigned N = 8
) (
  input  logic           rst,
  input  logic [N-1:0]   in_a_t, in_a_f,
  input  logic [N-1:0]   in_b_t, in_b_f,
  output logic           in_ack,
  input  logic [5*N-1:0] fb_t, fb_f,
  output logic           fb_ack,
  input  logic           sel_t, sel_f,
  output logic           sel_ack,
  output logic [5*N-1:0] x_t, x_f,
  input  logic           x_ack
);

  localparam int unsigned TW = 5 * N;

  logic          v;                 // operand word present (validity of a[0])
  logic [TW-1:0] ini_t, ini_f;      // initial token built from the input
  logic [TW-1:0] xi_t, xi_f, xf_t, xf_f;

  assign v = in_a_t[0] | in_a_f[0];

  assign ini_t[N-1:0]     = in_a_t;
  assign ini_f[N-1:0]     = in_a_f;
  assign ini_t[2*N-1:N]   = in_b_t;
  assign ini_f[2*N-1:N]   = in_b_f;
  assign ini_t[4*N-1:2*N] = '0;                                  // p = 0
  assign ini_f[4*N-1:2*N] = {(2*N){v}};
  assign ini_t[5*N-1:4*N] = {{(N-1){1'b0}}, v};                  // mark = 1
  assign ini_f[5*N-1:4*N] = {{(N-1){v}}, 1'b0};

  for (genvar i = 0; i < TW; i++) begin : g_bit
    c_element u_it (.rst(rst), .in({ini_t[i], sel_f}), .out(xi_t[i]));
    c_element u_if (.rst(rst), .in({ini_f[i], sel_f}), .out(xi_f[i]));
    c_element u_ft (.rst(rst), .in({fb_t[i],  sel_t}), .out(xf_t[i]));
    c_element u_ff (.rst(rst), .in({fb_f[i],  sel_t}), .out(xf_f[i]));
  end

  assign x_t = xi_t | xf_t;
  assign x_f = xi_f | xf_f;

  c_element u_in_ack (.rst(rst), .in({x_ack, sel_f}), .out(in_ack));
  c_element u_fb_ack (.rst(rst), .in({x_ack, sel_t}), .out(fb_ack));
  assign sel_ack = in_ack | fb_ack;

endmodule
