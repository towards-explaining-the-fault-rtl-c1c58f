// dims_and2: dual-rail AND gate in DIMS style (one partial-product bit).
//
// Four 2-input C-elements form the minterms of (a, b); the true rail is the
// (1,1) minterm, the false rail the OR of the other three.  The output is
// valid only once both inputs are valid and null only once both are null.
// Level-sensitive, no clock, no reset.
//
// Tool notes: as dims_full_adder, its minterm nets can be reported as part
// of the enclosing pipeline's handshake loops; no loop is inside this module.
module dims_and2 (
  input  logic a_t, a_f,
  input  logic b_t, b_f,
  output logic y_t, y_f
);

  logic m00, m01, m10, m11;

  c_element #(.N(2)) u_m00 (.rst(1'b0), .in({a_f, b_f}), .out(m00));
  c_element #(.N(2)) u_m01 (.rst(1'b0), .in({a_f, b_t}), .out(m01));
  c_element #(.N(2)) u_m10 (.rst(1'b0), .in({a_t, b_f}), .out(m10));
  c_element #(.N(2)) u_m11 (.rst(1'b0), .in({a_t, b_t}), .out(m11));

  assign y_t = m11;
  assign y_f = m00 | m01 | m10;

endmodule
