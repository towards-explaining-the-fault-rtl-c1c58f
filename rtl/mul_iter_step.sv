// mul_iter_step: the shared add-and-shift logic of the iterative multiplier.
//
// One ring token is {mark[N], p[2N], b[N], a[N]} (dual-rail, a at the LSB
// end).  Per pass the logic adds a & b[0] to the upper half of p with a DIMS
// ripple-carry adder and shifts p right by one, the adder's carry entering
// at the top; b is rotated right so that the next bit moves to b[0]; the
// one-hot iteration marker is rotated left.  After N passes p = a * b and
// the marker is back at bit 0, which is what the ring's split tests.  Only
// wiring apart from N DIMS AND gates and the adder; no storage, no
// handshake.  The right-shifting accumulator is this design's choice for
// sharing one N-bit adder across all partial products.
module mul_iter_step #(
  parameter int unsigned N = 8
) (
  input  logic [5*N-1:0] x_t, x_f,
  output logic [5*N-1:0] y_t, y_f
);

  logic [N-1:0]   a_t, a_f, b_t, b_f, m_t, m_f;
  logic [2*N-1:0] p_t, p_f, pn_t, pn_f;
  logic [N-1:0]   pp_t, pp_f, s_t, s_f;
  logic           c_t, c_f;

  assign {m_t, p_t, b_t, a_t} = x_t;
  assign {m_f, p_f, b_f, a_f} = x_f;

  for (genvar j = 0; j < N; j++) begin : g_pp
    dims_and2 u_and (
      .a_t (a_t[j]), .a_f (a_f[j]), .b_t (b_t[0]), .b_f (b_f[0]),
      .y_t (pp_t[j]), .y_f (pp_f[j]));
  end

  dims_rca #(.W(N)) u_add (
    .a_t (p_t[2*N-1:N]), .a_f (p_f[2*N-1:N]), .b_t (pp_t), .b_f (pp_f),
    .s_t (s_t), .s_f (s_f), .co_t (c_t), .co_f (c_f));

  assign pn_t = {c_t, s_t, p_t[N-1:1]};
  assign pn_f = {c_f, s_f, p_f[N-1:1]};

  assign y_t = {m_t[N-2:0], m_t[N-1], pn_t, b_t[0], b_t[N-1:1], a_t};
  assign y_f = {m_f[N-2:0], m_f[N-1], pn_f, b_f[0], b_f[N-1:1], a_f};

endmodule
