// completion_detector: completion detector (CD) for a W-bit dual-rail word.
//
// done rises once every bit of the word carries a valid code (HI or LO) and
// falls once every bit has returned to null; while the word is only partly
// valid or partly null it keeps its old value.  Each bit is reduced by an OR
// of its two rails and the W results are joined by one W-input C-element
// (a C-element tree in a gate-level netlist).  Purely level-sensitive, no
// clock and no reset: with a null input word it settles to 0 by itself.
//
// Tool notes: its output closes the enclosing buffer's handshake loop,
// which linters report as circular combinational logic; intended.
module completion_detector #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] in_t,
  input  logic [W-1:0] in_f,
  output logic         done
);

  logic [W-1:0] bit_valid;

  assign bit_valid = in_t | in_f;

  c_element #(.N(W)) u_join (
    .rst (1'b0),
    .in  (bit_valid),
    .out (done)
  );

endmodule
