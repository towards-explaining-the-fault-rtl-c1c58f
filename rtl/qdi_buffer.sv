// qdi_buffer: one pipeline buffer of the selected style, W-bit dual-rail.
//
// A thin generate switch over the five single-channel buffer styles, so that
// the multipliers can be built once and elaborated with any buffer style.
// All styles share the same four-phase interface: in_t/in_f/ack_out towards
// the predecessor, out_t/out_f/ack_in towards the successor, and a reset
// value (RST_T, RST_F) that is either all zero (empty) or a valid token.
//
// Tool notes: the selected buffer's handshake loops may be reported
// against this wrapper's ports as circular combinational logic; intended.
module qdi_buffer
  import qdi_pkg::*;
#(
  parameter buf_style_e   STYLE = BUF_WCHB,
  parameter int unsigned  W     = 8,
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

  if (STYLE == BUF_INTERLOCKING) begin : g_il
    buf_interlocking #(.W(W), .RST_T(RST_T), .RST_F(RST_F)) u_buf (.*);
  end else if (STYLE == BUF_DEADLOCKING) begin : g_dl
    buf_deadlocking #(.W(W), .RST_T(RST_T), .RST_F(RST_F)) u_buf (.*);
  end else if (STYLE == BUF_DUALCD) begin : g_dcd
    buf_dualcd #(.W(W), .RST_T(RST_T), .RST_F(RST_F)) u_buf (.*);
  end else if (STYLE == BUF_MTD) begin : g_mtd
    logic en_unused;
    buf_mtd #(.W(W), .RST_T(RST_T), .RST_F(RST_F)) u_buf (.*, .en(en_unused));
  end else begin : g_wchb
    buf_wchb #(.W(W), .RST_T(RST_T), .RST_F(RST_F)) u_buf (.*);
  end

endmodule
