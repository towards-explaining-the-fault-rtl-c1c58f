// mul_pp_stage: combinational logic of stage K of the pipelined multiplier.
//
// The stage forms the partial product a & b[K] (N DIMS AND gates) and adds
// it, shifted left by K, to the running sum acc (a DIMS ripple-carry adder
// on bits K..K+N-1 whose carry becomes bit K+N).  Bits below K are final and
// pass through, as do the operands a and b for the later stages.  Stage 0
// has no sum to add to: its sum is the partial product itself and its upper
// N bits are dual-rail zeros whose false rail is the validity of b[0].
//
// All signals are dual-rail (t/f).  There is no storage and no handshake
// here: the pipeline buffers around the stage do that.  The shift-and-add
// scheme follows the source; the bit-level arrangement (which bits are
// added, how the constant zeros of stage 0 are made) is this design's own.
module mul_pp_stage #(
  parameter int unsigned N = 8,
  parameter int unsigned K = 1
) (
  input  logic [N-1:0]   a_t, a_f,
  input  logic [N-1:0]   b_t, b_f,
  input  logic [2*N-1:0] acc_t, acc_f,   // unused when K == 0
  output logic [N-1:0]   ao_t, ao_f,
  output logic [N-1:0]   bo_t, bo_f,
  output logic [2*N-1:0] acco_t, acco_f
);

  logic [N-1:0] pp_t, pp_f;

  assign ao_t = a_t;
  assign ao_f = a_f;
  assign bo_t = b_t;
  assign bo_f = b_f;

  for (genvar j = 0; j < N; j++) begin : g_pp
    dims_and2 u_and (
      .a_t (a_t[j]), .a_f (a_f[j]), .b_t (b_t[K]), .b_f (b_f[K]),
      .y_t (pp_t[j]), .y_f (pp_f[j]));
  end

  if (K == 0) begin : g_first
    assign acco_t[N-1:0]   = pp_t;
    assign acco_f[N-1:0]   = pp_f;
    assign acco_t[2*N-1:N] = '0;
    assign acco_f[2*N-1:N] = {N{b_t[0] | b_f[0]}};
  end else begin : g_add
    logic [N-1:0] s_t, s_f;
    logic         c_t, c_f;

    dims_rca #(.W(N)) u_add (
      .a_t (acc_t[K+N-1:K]), .a_f (acc_f[K+N-1:K]),
      .b_t (pp_t), .b_f (pp_f),
      .s_t (s_t), .s_f (s_f), .co_t (c_t), .co_f (c_f));

    assign acco_t[K-1:0]     = acc_t[K-1:0];
    assign acco_f[K-1:0]     = acc_f[K-1:0];
    assign acco_t[K+N-1:K]   = s_t;
    assign acco_f[K+N-1:K]   = s_f;
    assign acco_t[K+N]       = c_t;
    assign acco_f[K+N]       = c_f;
    if (K + N + 1 <= 2*N - 1) begin : g_upper
      assign acco_t[2*N-1:K+N+1] = acc_t[2*N-1:K+N+1];
      assign acco_f[2*N-1:K+N+1] = acc_f[2*N-1:K+N+1];
    end
  end

endmodule
