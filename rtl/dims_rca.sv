// dims_rca: W-bit dual-rail ripple-carry adder built from DIMS cells.
//
// sum = a + b with no carry input: bit 0 is a DIMS half adder, bits 1..W-1
// are DIMS full adders chained through their dual-rail carries, and the last
// carry is brought out as co.  Because every cell waits for all its inputs
// in both phases, the adder's output word is complete only when the whole
// carry chain has resolved, and null only when every input is null.
// Level-sensitive, no clock, no reset.
module dims_rca #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a_t, a_f,
  input  logic [W-1:0] b_t, b_f,
  output logic [W-1:0] s_t, s_f,
  output logic         co_t, co_f
);

  logic [W:1] c_t, c_f;

  dims_half_adder u_ha (
    .a_t (a_t[0]), .a_f (a_f[0]), .b_t (b_t[0]), .b_f (b_f[0]),
    .s_t (s_t[0]), .s_f (s_f[0]), .co_t (c_t[1]), .co_f (c_f[1]));

  for (genvar i = 1; i < W; i++) begin : g_fa
    dims_full_adder u_fa (
      .a_t (a_t[i]), .a_f (a_f[i]), .b_t (b_t[i]), .b_f (b_f[i]),
      .c_t (c_t[i]), .c_f (c_f[i]),
      .s_t (s_t[i]), .s_f (s_f[i]), .co_t (c_t[i+1]), .co_f (c_f[i+1]));
  end

  assign co_t   = c_t[W];
  assign co_f   = c_f[W];

endmodule
