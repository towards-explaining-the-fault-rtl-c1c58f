// buf_dd_wchb: doubled-up double-checking (DD) WCHB for a W-bit dual-rail
// channel that exists in two copies, A and B.
//
// The whole channel (rails and acknowledge) is duplicated and the two copies
// are interlocked: every storage C-element of either copy has four inputs,
// the input rail of copy A, the same rail of copy B and the enables
// (~ack_in) of both copies.  A rail therefore changes only when both copies
// agree on it, so a transient on any single signal of one copy cannot set
// or clear a stored rail; at worst it delays the handshake.  The completion
// detectors are double-checked the same way: per bit, each copy joins the
// bit-valid ORs of both copies in a C-element, and each copy's ack_out is
// the C-element over its W joined bits.
//
// Interface: two four-phase channels in parallel (suffix _a and _b) that
// carry the same tokens; reset loads (RST_T, RST_F) into both copies,
// all zero (the default) for an empty buffer or a valid word for an initial
// token.  The source describes the
// technique (duplicate, then vote with C-elements on every intermediate
// signal); the gate-level arrangement here is this design's reading of it.
//
// Tool notes: the two copies' rails and acknowledges cross into each
// other's C-elements; linters report these loops and the handshake loops
// as circular combinational logic.  Intended.
module buf_dd_wchb #(
  parameter int unsigned W     = 8,
  parameter logic [W-1:0] RST_T = '0,
  parameter logic [W-1:0] RST_F = '0
) (
  input  logic         rst,
  input  logic [W-1:0] in_a_t, in_a_f, in_b_t, in_b_f,
  output logic         ack_out_a, ack_out_b,
  output logic [W-1:0] out_a_t, out_a_f, out_b_t, out_b_f,
  input  logic         ack_in_a, ack_in_b
);

  logic         en_a, en_b;
  logic [W-1:0] or_a, or_b, v_a, v_b;

  assign en_a = ~ack_in_a;
  assign en_b = ~ack_in_b;

  for (genvar i = 0; i < W; i++) begin : g_bit
    c_element #(.N(4), .RST_VAL(RST_T[i])) u_at (.rst(rst), .in({in_a_t[i], in_b_t[i], en_a, en_b}), .out(out_a_t[i]));
    c_element #(.N(4), .RST_VAL(RST_F[i])) u_af (.rst(rst), .in({in_a_f[i], in_b_f[i], en_a, en_b}), .out(out_a_f[i]));
    c_element #(.N(4), .RST_VAL(RST_T[i])) u_bt (.rst(rst), .in({in_a_t[i], in_b_t[i], en_a, en_b}), .out(out_b_t[i]));
    c_element #(.N(4), .RST_VAL(RST_F[i])) u_bf (.rst(rst), .in({in_a_f[i], in_b_f[i], en_a, en_b}), .out(out_b_f[i]));

    c_element #(.N(2)) u_va (.rst(1'b0), .in({or_a[i], or_b[i]}), .out(v_a[i]));
    c_element #(.N(2)) u_vb (.rst(1'b0), .in({or_a[i], or_b[i]}), .out(v_b[i]));
  end

  assign or_a = out_a_t | out_a_f;
  assign or_b = out_b_t | out_b_f;

  c_element #(.N(W)) u_cd_a (.rst(1'b0), .in(v_a), .out(ack_out_a));
  c_element #(.N(W)) u_cd_b (.rst(1'b0), .in(v_b), .out(ack_out_b));

endmodule
