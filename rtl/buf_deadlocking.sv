// buf_deadlocking: deadlocking WCHB for a W-bit dual-rail channel.
//
// Like the plain WCHB, each rail is a C-element of the input rail and the
// enable en = ~ack_in.  In addition, the other rail of the same bit enters
// each C-element as an input that acts on the falling transition only: a
// rail can only be cleared while its partner rail is low.  If a fault ever
// sets both rails of a bit, neither can fall again, the buffer never takes
// the spacer and the pipeline stops: the fault is turned into a deadlock
// instead of a silently wrong value further down.  Rising transitions are
// those of the plain WCHB.
//
// Interface and reset: as buf_wchb.  The gate structure ("-" inputs
// cross-coupled between the two rails) is taken from the deadlocking WCHB
// drawing of the source; the reset is this design's choice.
//
// Tool notes: each rail's C-element reads the other rail's output, so the
// two rails form a deliberate loop, on top of the handshake loops; linters
// report it as circular combinational logic.  Intended.
module buf_deadlocking #(
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
    // Asymmetric C-elements: set needs input and enable high; reset needs
    // input and enable low and the other rail low.
    always_latch begin
      if (rst)                                 out_t[i] = RST_T[i];
      else if (in_t[i] && en)                  out_t[i] = 1'b1;
      else if (!in_t[i] && !en && !out_f[i])   out_t[i] = 1'b0;
    end
    always_latch begin
      if (rst)                                 out_f[i] = RST_F[i];
      else if (in_f[i] && en)                  out_f[i] = 1'b1;
      else if (!in_f[i] && !en && !out_t[i])   out_f[i] = 1'b0;
    end
  end

  completion_detector #(.W(W)) u_cd (
    .in_t (out_t), .in_f (out_f), .done (ack_out));

endmodule
