// mul_iterative_dd: the iterative (ring) multiplier of mul_iterative in the
// doubled-up double-checking (DD) style.
//
// The whole ring exists twice, copy A and copy B: merge, add/shift logic,
// split gates, acknowledge joins and select token.  The five buffers of the
// ring (B1, B2, B3, the select buffer S and the output buffer BO) are
// buf_dd_wchb buffers shared by both copies, so a token moves on only when
// both copies agree on every rail, and a transient on one copy's signal is
// held back at the next buffer.  S resets holding "take the input" in both
// copies.  Everything else is exactly the single-copy ring: N passes per
// product, the marker bit 0 steering the split, its inverse the select
// token (see mul_iterative for the operation of the ring).
//
// Interface: as mul_pipelined_dd, two copies of each channel with the
// suffixes _a and _b; the source must drive both copies with the same data
// and the sink must acknowledge both.  Four-phase, no clock; rst empties the
// buffers and loads S.
//
// Following the source: an iterative multiplier built with the DD WCHB
// buffer and logic style.  This design's own: the ring itself (as in
// mul_iterative), and that the two copies are cross-checked at the buffers
// only; the merge, split and logic gates of each copy are not cross-checked
// individually.
//
// Tool notes: the rings, the handshake loops and the cross-checking between
// the copies are reported by linters as circular combinational logic, the
// C-elements as latches; intended.
module mul_iterative_dd
  import qdi_pkg::*;
#(
  parameter int unsigned N = MUL_WIDTH
) (
  input  logic           rst,
  input  logic [N-1:0]   in_a_t_a, in_a_f_a, in_b_t_a, in_b_f_a,
  input  logic [N-1:0]   in_a_t_b, in_a_f_b, in_b_t_b, in_b_f_b,
  output logic           in_ack_a, in_ack_b,
  output logic [2*N-1:0] out_p_t_a, out_p_f_a, out_p_t_b, out_p_f_b,
  input  logic           out_ack_a, out_ack_b
);

  localparam int unsigned TW = 5 * N;
  localparam int unsigned M0 = 4 * N;   // position of marker bit 0 in a token

  // Index 0 is copy A, index 1 copy B.
  logic [N-1:0]   ia_t [2], ia_f [2], ib_t [2], ib_f [2];
  logic           in_ack [2];
  logic [TW-1:0]  x_t [2], x_f [2], x1_t [2], x1_f [2], xs_t [2], xs_f [2];
  logic [TW-1:0]  y_t [2], y_f [2], f_in_t [2], f_in_f [2], fb_t [2], fb_f [2];
  logic [2*N-1:0] o_in_t [2], o_in_f [2], o_t [2], o_f [2];
  logic           b1_ack [2], b2_ack [2], b3_ack [2], bo_ack [2], s_ack [2];
  logic           fb_ack [2], sel_ack [2], sel_t [2], sel_f [2];
  logic           split_ack [2], b2_ack_in [2], out_ack [2];
  logic           s_in_t [2], s_in_f [2];

  assign ia_t[0] = in_a_t_a;  assign ia_f[0] = in_a_f_a;
  assign ib_t[0] = in_b_t_a;  assign ib_f[0] = in_b_f_a;
  assign ia_t[1] = in_a_t_b;  assign ia_f[1] = in_a_f_b;
  assign ib_t[1] = in_b_t_b;  assign ib_f[1] = in_b_f_b;
  assign in_ack_a  = in_ack[0];
  assign in_ack_b  = in_ack[1];
  assign out_p_t_a = o_t[0];  assign out_p_f_a = o_f[0];
  assign out_p_t_b = o_t[1];  assign out_p_f_b = o_f[1];
  assign out_ack[0] = out_ack_a;
  assign out_ack[1] = out_ack_b;

  for (genvar c = 0; c < 2; c++) begin : g_copy
    mul_iter_merge #(.N(N)) u_merge (
      .rst,
      .in_a_t (ia_t[c]), .in_a_f (ia_f[c]), .in_b_t (ib_t[c]), .in_b_f (ib_f[c]),
      .in_ack (in_ack[c]),
      .fb_t (fb_t[c]), .fb_f (fb_f[c]), .fb_ack (fb_ack[c]),
      .sel_t (sel_t[c]), .sel_f (sel_f[c]), .sel_ack (sel_ack[c]),
      .x_t (x_t[c]), .x_f (x_f[c]), .x_ack (b1_ack[c]));

    mul_iter_step #(.N(N)) u_step (
      .x_t (x1_t[c]), .x_f (x1_f[c]), .y_t (xs_t[c]), .y_f (xs_f[c]));

    // Split on marker bit 0, per copy.
    for (genvar i = 0; i < TW; i++) begin : g_split_fb
      c_element u_t (.rst(1'b0), .in({y_t[c][i], y_f[c][M0]}), .out(f_in_t[c][i]));
      c_element u_f (.rst(1'b0), .in({y_f[c][i], y_f[c][M0]}), .out(f_in_f[c][i]));
    end
    for (genvar i = 0; i < 2*N; i++) begin : g_split_out
      c_element u_t (.rst(1'b0), .in({y_t[c][2*N+i], y_t[c][M0]}), .out(o_in_t[c][i]));
      c_element u_f (.rst(1'b0), .in({y_f[c][2*N+i], y_t[c][M0]}), .out(o_in_f[c][i]));
    end
    assign split_ack[c] = b3_ack[c] | bo_ack[c];

    // Resets high for the same reason as in mul_iterative: S starts full.
    c_element #(.N(2), .RST_VAL(1'b1)) u_b2_join (
      .rst(rst), .in({split_ack[c], s_ack[c]}), .out(b2_ack_in[c]));

    // Select token input: the inverse of marker bit 0.
    assign s_in_t[c] = y_f[c][M0];
    assign s_in_f[c] = y_t[c][M0];
  end

  buf_dd_wchb #(.W(TW)) u_b1 (
    .rst,
    .in_a_t (x_t[0]), .in_a_f (x_f[0]), .in_b_t (x_t[1]), .in_b_f (x_f[1]),
    .ack_out_a (b1_ack[0]), .ack_out_b (b1_ack[1]),
    .out_a_t (x1_t[0]), .out_a_f (x1_f[0]), .out_b_t (x1_t[1]), .out_b_f (x1_f[1]),
    .ack_in_a (b2_ack[0]), .ack_in_b (b2_ack[1]));

  buf_dd_wchb #(.W(TW)) u_b2 (
    .rst,
    .in_a_t (xs_t[0]), .in_a_f (xs_f[0]), .in_b_t (xs_t[1]), .in_b_f (xs_f[1]),
    .ack_out_a (b2_ack[0]), .ack_out_b (b2_ack[1]),
    .out_a_t (y_t[0]), .out_a_f (y_f[0]), .out_b_t (y_t[1]), .out_b_f (y_f[1]),
    .ack_in_a (b2_ack_in[0]), .ack_in_b (b2_ack_in[1]));

  buf_dd_wchb #(.W(1), .RST_T(1'b0), .RST_F(1'b1)) u_s (
    .rst,
    .in_a_t (s_in_t[0]), .in_a_f (s_in_f[0]), .in_b_t (s_in_t[1]), .in_b_f (s_in_f[1]),
    .ack_out_a (s_ack[0]), .ack_out_b (s_ack[1]),
    .out_a_t (sel_t[0]), .out_a_f (sel_f[0]), .out_b_t (sel_t[1]), .out_b_f (sel_f[1]),
    .ack_in_a (sel_ack[0]), .ack_in_b (sel_ack[1]));

  buf_dd_wchb #(.W(TW)) u_b3 (
    .rst,
    .in_a_t (f_in_t[0]), .in_a_f (f_in_f[0]), .in_b_t (f_in_t[1]), .in_b_f (f_in_f[1]),
    .ack_out_a (b3_ack[0]), .ack_out_b (b3_ack[1]),
    .out_a_t (fb_t[0]), .out_a_f (fb_f[0]), .out_b_t (fb_t[1]), .out_b_f (fb_f[1]),
    .ack_in_a (fb_ack[0]), .ack_in_b (fb_ack[1]));

  buf_dd_wchb #(.W(2*N)) u_bo (
    .rst,
    .in_a_t (o_in_t[0]), .in_a_f (o_in_f[0]), .in_b_t (o_in_t[1]), .in_b_f (o_in_f[1]),
    .ack_out_a (bo_ack[0]), .ack_out_b (bo_ack[1]),
    .out_a_t (o_t[0]), .out_a_f (o_f[0]), .out_b_t (o_t[1]), .out_b_f (o_f[1]),
    .ack_in_a (out_ack[0]), .ack_in_b (out_ack[1]));

endmodule
