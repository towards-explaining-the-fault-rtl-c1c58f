// c_element: N-input Muller C-element with synchronous-free (level) reset.
//
// The output becomes 1 when every input is 1, becomes 0 when every input is
// 0, and keeps its value while the inputs disagree: an AND gate with
// hysteresis.  It is the state-holding gate of every buffer, completion
// detector and DIMS minterm in this design.  It is written as a level latch
// whose enable is "all inputs agree"; while rst is high the output is forced
// to RST_VAL.  No clock is involved; timing is set only by the inputs.
//
// The C-element behaviour follows the design's source; the N-input
// generalisation and the reset are choices of this implementation.  Synthesis
// infers a latch here on purpose: that is the state of the gate.
//
// Tool notes: the latch is the intended storage of the gate.  Linters may
// report it (NOLATCH when the enable is not a plain signal) and, once many
// C-elements are wired into handshake loops, report those loops as
// circular logic; both are expected in a clockless circuit.
module c_element #(
  parameter int unsigned N       = 2,
  parameter bit          RST_VAL = 1'b0
) (
  input  logic         rst,
  input  logic [N-1:0] in,
  output logic         out
);

  always_latch begin
    if (rst)           out = RST_VAL;
    else if (&in)      out = 1'b1;
    else if (!(|in))   out = 1'b0;
  end

endmodule
