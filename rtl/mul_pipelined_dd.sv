// mul_pipelined_dd: the pipelined multiplier of mul_pipelined built in the
// doubled-up double-checking (DD) WCHB style.
//
// The whole circuit exists twice (copies A and B).  Each stage's DIMS logic
// is instantiated once per copy; each pipeline buffer is a buf_dd_wchb that
// stores a rail only when both copies agree on it and acknowledges only
// when both copies are complete.  The structure is otherwise that of
// mul_pipelined: N stages of buffer plus partial-product/add logic, an
// output buffer, and OPS logic stages per buffer.
//
// Interface: the operand and product channels of mul_pipelined, doubled
// (suffixes _a and _b).  The environment drives both input copies with the
// same tokens and acknowledges both output copies; each copy's acknowledge
// is the one to wait for on its own channel.  No clock; rst empties all
// buffers.  In this design the copies are cross-checked at every buffer; the
// DIMS gates between two buffers are duplicated but not individually
// cross-checked (a departure from checking every intermediate signal).
//
// Tool notes: the handshake loops and the cross-checking between the two
// copies are reported by linters as circular combinational logic, the
// C-elements as latches; intended.
module mul_pipelined_dd
  import qdi_pkg::*;
#(
  parameter int unsigned N   = MUL_WIDTH,
  parameter int unsigned OPS = 1
) (
  input  logic           rst,
  input  logic [N-1:0]   in_a_t_a, in_a_f_a, in_b_t_a, in_b_f_a,
  input  logic [N-1:0]   in_a_t_b, in_a_f_b, in_b_t_b, in_b_f_b,
  output logic           in_ack_a, in_ack_b,
  output logic [2*N-1:0] out_p_t_a, out_p_f_a, out_p_t_b, out_p_f_b,
  input  logic           out_ack_a, out_ack_b
);

  // Token before buffer k ({acc, b, a}, 4N bits) and after it, per copy.
  logic [4*N-1:0] p_t [2][N+1], p_f [2][N+1];
  logic [4*N-1:0] q_t [2][N],   q_f [2][N];
  logic           back [2][N+1];

  assign p_t[0][0] = {{(2*N){1'b0}}, in_b_t_a, in_a_t_a};
  assign p_f[0][0] = {{(2*N){1'b0}}, in_b_f_a, in_a_f_a};
  assign p_t[1][0] = {{(2*N){1'b0}}, in_b_t_b, in_a_t_b};
  assign p_f[1][0] = {{(2*N){1'b0}}, in_b_f_b, in_a_f_b};
  assign in_ack_a  = back[0][0];
  assign in_ack_b  = back[1][0];

  for (genvar k = 0; k < N; k++) begin : g_stage
    localparam int unsigned NEXT = (k + OPS < N) ? k + OPS : N;
    // Buffer 0 holds only the operands; the others hold {acc, b, a}.
    localparam int unsigned BW   = (k == 0) ? 2 * N : 4 * N;

    if (k % OPS == 0) begin : g_buf
      buf_dd_wchb #(.W(BW)) u_buf (
        .rst,
        .in_a_t (p_t[0][k][BW-1:0]), .in_a_f (p_f[0][k][BW-1:0]),
        .in_b_t (p_t[1][k][BW-1:0]), .in_b_f (p_f[1][k][BW-1:0]),
        .ack_out_a (back[0][k]), .ack_out_b (back[1][k]),
        .out_a_t (q_t[0][k][BW-1:0]), .out_a_f (q_f[0][k][BW-1:0]),
        .out_b_t (q_t[1][k][BW-1:0]), .out_b_f (q_f[1][k][BW-1:0]),
        .ack_in_a (back[0][NEXT]), .ack_in_b (back[1][NEXT]));
      if (k == 0) begin : g_noacc
        for (genvar c = 0; c < 2; c++) begin : g_c
          assign q_t[c][k][4*N-1:2*N] = '0;
          assign q_f[c][k][4*N-1:2*N] = '0;
        end
      end
    end else begin : g_wire
      for (genvar c = 0; c < 2; c++) begin : g_c
        assign q_t[c][k] = p_t[c][k];
        assign q_f[c][k] = p_f[c][k];
        assign back[c][k] = 1'b0;
      end
    end

    for (genvar c = 0; c < 2; c++) begin : g_copy
      mul_pp_stage #(.N(N), .K(k)) u_logic (
        .a_t    (q_t[c][k][N-1:0]),       .a_f    (q_f[c][k][N-1:0]),
        .b_t    (q_t[c][k][2*N-1:N]),     .b_f    (q_f[c][k][2*N-1:N]),
        .acc_t  (q_t[c][k][4*N-1:2*N]),   .acc_f  (q_f[c][k][4*N-1:2*N]),
        .ao_t   (p_t[c][k+1][N-1:0]),     .ao_f   (p_f[c][k+1][N-1:0]),
        .bo_t   (p_t[c][k+1][2*N-1:N]),   .bo_f   (p_f[c][k+1][2*N-1:N]),
        .acco_t (p_t[c][k+1][4*N-1:2*N]), .acco_f (p_f[c][k+1][4*N-1:2*N]));
    end
  end

  buf_dd_wchb #(.W(2*N)) u_out_buf (
    .rst,
    .in_a_t (p_t[0][N][4*N-1:2*N]), .in_a_f (p_f[0][N][4*N-1:2*N]),
    .in_b_t (p_t[1][N][4*N-1:2*N]), .in_b_f (p_f[1][N][4*N-1:2*N]),
    .ack_out_a (back[0][N]), .ack_out_b (back[1][N]),
    .out_a_t (out_p_t_a), .out_a_f (out_p_f_a),
    .out_b_t (out_p_t_b), .out_b_f (out_p_f_b),
    .ack_in_a (out_ack_a), .ack_in_b (out_ack_b));

endmodule
