// dims_half_adder: dual-rail half adder in DIMS style.
//
// Four 2-input C-elements form the minterms of (a, b); the sum rails are the
// XOR minterms, the carry rails the AND minterms.  Used as the lowest bit of
// a ripple-carry adder that has no carry input.  Level-sensitive, no clock,
// no reset.
//
// Tool notes: as dims_full_adder, its minterm nets can be reported as part
// of the enclosing pipeline's handshake loops; no loop is inside this module.
module dims_half_adder (
  input  logic a_t, a_f,
  input  logic b_t, b_f,
  output logic s_t, s_f,
  output logic co_t, co_f
);

  logic m00, m01, m10, m11;

  c_element #(.N(2)) u_m00 (.rst(1'b0), .in({a_f, b_f}), .out(m00));
  c_element #(.N(2)) u_m01 (.rst(1'b0), .in({a_f, b_t}), .out(m01));
  c_element #(.N(2)) u_m10 (.rst(1'b0), .in({a_t, b_f}), .out(m10));
  c_element #(.N(2)) u_m11 (.rst(1'b0), .in({a_t, b_t}), .out(m11));

  assign s_t  = m01 | m10;
  assign s_f  = m00 | m11;
  assign co_t = m11;
  assign co_f = m00 | m01 | m10;

endmodule
