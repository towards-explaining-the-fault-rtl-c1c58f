// buf_dualcd: dual-CD WCHB ("normally closed" half buffer), W-bit dual-rail.
//
// A second completion detector watches the buffer's input.  The enable of
// the storage C-elements is itself a C-element of that input CD and the
// inverted successor acknowledge: en rises only when the input word is
// complete and the successor has taken the spacer, and falls only when the
// input word is entirely null and the successor has taken the data.  While a
// word is still arriving bit by bit, or while a transient sits on an input
// rail of an incomplete word, the storage elements stay closed.  ack_out is
// the CD of the buffer's output, as in the plain WCHB.
//
// Interface and reset: as buf_wchb.  The structure (input CD, output CD, one
// C-element with the inverted ack_in forming en) follows the dual-CD WCHB
// drawing of the source.  en resets to 1 when the buffer resets to a data
// token (so that the token is held) and to 0 when it resets empty; that is
// this design's choice.
//
// Tool notes: the handshake loops (through both completion detectors and
// the acknowledges) are reported by linters as circular combinational
// logic, and the C-elements as latches.  Intended.
module buf_dualcd #(
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

  localparam bit EN_RST = |(RST_T | RST_F);

  logic cd_in;
  logic en;

  completion_detector #(.W(W)) u_cd_in (
    .in_t (in_t), .in_f (in_f), .done (cd_in));

  c_element #(.N(2), .RST_VAL(EN_RST)) u_en (
    .rst (rst), .in ({cd_in, ~ack_in}), .out (en));

  for (genvar i = 0; i < W; i++) begin : g_bit
    c_element #(.N(2), .RST_VAL(RST_T[i])) u_ct (
      .rst (rst), .in ({in_t[i], en}), .out (out_t[i]));
    c_element #(.N(2), .RST_VAL(RST_F[i])) u_cf (
      .rst (rst), .in ({in_f[i], en}), .out (out_f[i]));
  end

  completion_detector #(.W(W)) u_cd_out (
    .in_t (out_t), .in_f (out_f), .done (ack_out));

endmodule
