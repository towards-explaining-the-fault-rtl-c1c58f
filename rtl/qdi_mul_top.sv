// qdi_mul_top: the multiplier targets of the QDI fault-sensitivity study,
// side by side.
//
// Four independent N x N bit dual-rail four-phase multipliers, each with
// its own operand and product channels:
//   * pipe_  : mul_pipelined, N partial-product stages plus an output buffer,
//              OPS logic stages per buffer, buffers of style STYLE;
//   * iter_  : mul_iterative, one shared partial-product/adder stage in a
//              ring with a select-token control loop, buffers of style STYLE;
//   * dd_    : mul_pipelined_dd, the pipelined multiplier built twice in the
//              doubled-up double-checking WCHB style (channel copies _a, _b);
//   * iterdd_: mul_iterative_dd, the iterative multiplier built twice in the
//              same DD style (channel copies _a, _b).
// The circuits share nothing but rst.  Channels: the environment drives a
// complete dual-rail operand word, waits for *_in_ack to rise, returns the
// rails to null, waits for *_in_ack to fall; at the output it raises
// *_out_ack after taking a complete product and lowers it after the spacer.
// There is no clock.  Defaults: 8-bit operands, one operation per stage and
// the plain WCHB, the largest width and the base buffer style of the study.
//
// Tool notes: the handshake loops of every buffer and the rings of the
// iterative multiplier are reported by linters as circular combinational
// logic, and the C-elements and D latches as latches; all intended.
module qdi_mul_top
  import qdi_pkg::*;
#(
  parameter int unsigned N     = MUL_WIDTH,
  parameter int unsigned OPS   = 1,
  parameter buf_style_e  STYLE = BUF_WCHB
) (
  input  logic           rst,
  // Pipelined multiplier.
  input  logic [N-1:0]   pipe_a_t, pipe_a_f, pipe_b_t, pipe_b_f,
  output logic           pipe_in_ack,
  output logic [2*N-1:0] pipe_p_t, pipe_p_f,
  input  logic           pipe_out_ack,
  // Iterative multiplier.
  input  logic [N-1:0]   iter_a_t, iter_a_f, iter_b_t, iter_b_f,
  output logic           iter_in_ack,
  output logic [2*N-1:0] iter_p_t, iter_p_f,
  input  logic           iter_out_ack,
  // DD WCHB pipelined multiplier, two channel copies.
  input  logic [N-1:0]   dd_a_t_a, dd_a_f_a, dd_b_t_a, dd_b_f_a,
  input  logic [N-1:0]   dd_a_t_b, dd_a_f_b, dd_b_t_b, dd_b_f_b,
  output logic           dd_in_ack_a, dd_in_ack_b,
  output logic [2*N-1:0] dd_p_t_a, dd_p_f_a, dd_p_t_b, dd_p_f_b,
  input  logic           dd_out_ack_a, dd_out_ack_b,
  // DD WCHB iterative multiplier, two channel copies.
  input  logic [N-1:0]   iterdd_a_t_a, iterdd_a_f_a, iterdd_b_t_a, iterdd_b_f_a,
  input  logic [N-1:0]   iterdd_a_t_b, iterdd_a_f_b, iterdd_b_t_b, iterdd_b_f_b,
  output logic           iterdd_in_ack_a, iterdd_in_ack_b,
  output logic [2*N-1:0] iterdd_p_t_a, iterdd_p_f_a, iterdd_p_t_b, iterdd_p_f_b,
  input  logic           iterdd_out_ack_a, iterdd_out_ack_b
);

  mul_pipelined #(.N(N), .OPS(OPS), .STYLE(STYLE)) u_pipe (
    .rst,
    .in_a_t (pipe_a_t), .in_a_f (pipe_a_f), .in_b_t (pipe_b_t), .in_b_f (pipe_b_f),
    .in_ack (pipe_in_ack),
    .out_p_t (pipe_p_t), .out_p_f (pipe_p_f), .out_ack (pipe_out_ack));

  mul_iterative #(.N(N), .STYLE(STYLE)) u_iter (
    .rst,
    .in_a_t (iter_a_t), .in_a_f (iter_a_f), .in_b_t (iter_b_t), .in_b_f (iter_b_f),
    .in_ack (iter_in_ack),
    .out_p_t (iter_p_t), .out_p_f (iter_p_f), .out_ack (iter_out_ack));

  mul_pipelined_dd #(.N(N), .OPS(OPS)) u_dd (
    .rst,
    .in_a_t_a (dd_a_t_a), .in_a_f_a (dd_a_f_a), .in_b_t_a (dd_b_t_a), .in_b_f_a (dd_b_f_a),
    .in_a_t_b (dd_a_t_b), .in_a_f_b (dd_a_f_b), .in_b_t_b (dd_b_t_b), .in_b_f_b (dd_b_f_b),
    .in_ack_a (dd_in_ack_a), .in_ack_b (dd_in_ack_b),
    .out_p_t_a (dd_p_t_a), .out_p_f_a (dd_p_f_a), .out_p_t_b (dd_p_t_b), .out_p_f_b (dd_p_f_b),
    .out_ack_a (dd_out_ack_a), .out_ack_b (dd_out_ack_b));

  mul_iterative_dd #(.N(N)) u_iterdd (
    .rst,
    .in_a_t_a (iterdd_a_t_a), .in_a_f_a (iterdd_a_f_a), .in_b_t_a (iterdd_b_t_a), .in_b_f_a (iterdd_b_f_a),
    .in_a_t_b (iterdd_a_t_b), .in_a_f_b (iterdd_a_f_b), .in_b_t_b (iterdd_b_t_b), .in_b_f_b (iterdd_b_f_b),
    .in_ack_a (iterdd_in_ack_a), .in_ack_b (iterdd_in_ack_b),
    .out_p_t_a (iterdd_p_t_a), .out_p_f_a (iterdd_p_f_a), .out_p_t_b (iterdd_p_t_b), .out_p_f_b (iterdd_p_f_b),
    .out_ack_a (iterdd_out_ack_a), .out_ack_b (iterdd_out_ack_b));

endmodule
