// dims_full_adder: dual-rail full adder in Delay-Insensitive Minterm
// Synthesis (DIMS).
//
// Each of the eight minterms of (a, b, cin) is one 3-input C-element over the
// matching rails.  Exactly one minterm fires for a valid input word; the
// sum and carry rails are ORs of the minterms in which they are 1 or 0.  The
// outputs return to null only after all three inputs are null, so the
// adder indicates both phases of the four-phase protocol and needs no
// completion signal of its own.  Level-sensitive, no clock, no reset (a null
// input word clears every minterm).
//
// Tool notes: the minterm C-elements sit inside the handshake loops of the
// pipeline that uses the adder, so linters can report their nets as part
// of a combinational loop; the loop is closed through the buffers'
// acknowledges, not inside this module.
module dims_full_adder (
  input  logic a_t, a_f,
  input  logic b_t, b_f,
  input  logic c_t, c_f,
  output logic s_t, s_f,
  output logic co_t, co_f
);

  // m[k] is the minterm with {a,b,cin} == k.
  logic [7:0] m;

  for (genvar k = 0; k < 8; k++) begin : g_min
    c_element #(.N(3)) u_m (
      .rst (1'b0),
      .in  ({(k & 4) != 0 ? a_t : a_f,
             (k & 2) != 0 ? b_t : b_f,
             (k & 1) != 0 ? c_t : c_f}),
      .out (m[k]));
  end

  assign s_t  = m[1] | m[2] | m[4] | m[7];
  assign s_f  = m[0] | m[3] | m[5] | m[6];
  assign co_t = m[3] | m[5] | m[6] | m[7];
  assign co_f = m[0] | m[1] | m[2] | m[4];

endmodule
