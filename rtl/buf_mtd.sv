// buf_mtd: Mousetrap-style D-latch half buffer (MTDLatchHB), W-bit dual-rail.
//
// The rails are stored in plain D latches.  Their enable is the XNOR of the
// buffer's own acknowledge (ack_out, the CD of the latch outputs) and the
// successor's acknowledge ack_in: the latches are transparent while both
// agree and close as soon as the output CD reports a new phase that the
// successor has not yet acknowledged.  An empty buffer therefore waits with
// transparent latches; a data token closes them as soon as it is complete;
// the successor's acknowledge reopens them for the spacer, which closes them
// again when the CD falls.  This is not strictly QDI: the latches must close
// before the predecessor's next phase arrives.
//
// Interface and reset: as buf_wchb.  The structure (D latches, output CD,
// one XOR gate with inverted output driving the latch enable) follows the
// Mousetrap-style buffer drawing of the source; the reset is this design's
// choice.  The enable is computed inside the latch process from the two
// acknowledges so that a simulator with zero gate delays always evaluates
// the latch with the current enable; en is brought out for observation.
//
// Tool notes: ack_out feeds back into the latch enable, a loop that linters
// report as circular combinational logic; the D latches are intended.
module buf_mtd #(
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
  input  logic         ack_in,
  output logic         en
);

  assign en = ~(ack_out ^ ack_in);

  always_latch begin
    if (rst) begin
      out_t = RST_T;
      out_f = RST_F;
    end else if (!(ack_out ^ ack_in)) begin
      out_t = in_t;
      out_f = in_f;
    end
  end

  completion_detector #(.W(W)) u_cd (
    .in_t (out_t), .in_f (out_f), .done (ack_out));

endmodule
