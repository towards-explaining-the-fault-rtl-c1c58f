// buf_wchb: weak-conditioned half buffer (WCHB) for a W-bit dual-rail channel.
//
// Each rail is stored in a 2-input C-element whose second input is the
// enable en = ~ack_in (ack_in is the successor's acknowledge).  A rail can
// therefore rise only when the successor has taken the spacer, and fall only
// when the successor has taken the data token; the input itself must also
// have returned to null before the rail falls (the "weak condition").
// ack_out, the acknowledge towards the predecessor, is the completion
// detector of the buffer's own output.
//
// Interface: four-phase return-to-zero.  in_t/in_f and ack_out face the
// predecessor, out_t/out_f and ack_in face the successor.  While rst is high
// the output holds the word (RST_T, RST_F): all zero is an empty buffer, a
// valid code word is an initial token.  The structure follows the common
// WCHB; the reset is this design's choice.
//
// Tool notes: out -> completion detector -> ack_out -> predecessor -> in ->
// out, and ack_in -> en -> out -> successor -> ack_in, are the handshake
// loops of the four-phase protocol.  A linter flags them as circular
// combinational logic (and the C-elements as latches); that is intended.
module buf_wchb #(
  parameter int unsigned W     = 8,
  parameter logic [W-1:0] RST_T = '0,
  parameter logic [W-1:0] RST_F = '0
) (
  input  logic         rst,
  input  logic [W-1:0] in_t,
  input  logic [W-1:0] in_f,
  output logic         ack_out,
  output logic [W-1:0] out_t,
  output logic [W-1:0] out_f,
  input  logic         ack_in
);

  logic en;

  assign en = ~ack_in;

  for (genvar i = 0; i < W; i++) begin : g_bit
    c_element #(.N(2), .RST_VAL(RST_T[i])) u_ct (
      .rst (rst), .in ({in_t[i], en}), .out (out_t[i]));
    c_element #(.N(2), .RST_VAL(RST_F[i])) u_cf (
      .rst (rst), .in ({in_f[i], en}), .out (out_f[i]));
  end

  completion_detector #(.W(W)) u_cd (
    .in_t (out_t), .in_f (out_f), .done (ack_out));

endmodule
