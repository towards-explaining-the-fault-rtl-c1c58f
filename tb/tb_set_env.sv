// tb_set_env: single-event-transient injection environment for one
// pipelined multiplier (helper of tb_set_campaign).
//
// The environment owns one multiplier of buffer style STYLE with OPS
// operations per stage (or, with DD set, the doubled-up double-checking
// version) and repeats RUNS short
// runs.  Each run resets the circuit, streams TOKENS random operand pairs
// through it with a four-phase source and sink, and inverts one internal
// signal for PW time units at a random moment inside the run (run 0 is the
// fault-free reference and injects nothing).  Victims are chosen at random
// from two groups: data signals (both rails of every sum bit at the input
// and at the output of each internal buffer position) and control signals
// (the acknowledge of every buffer position but the first; with OPS > 1 the
// positions without a buffer are plain wires, and a pulse on their unused
// acknowledge has no effect).  Primary inputs and the
// gates that drive primary outputs are not injected.  In the DD version
// only copy A is injected.
//
// Each run is classified by monitors on the product channel, once per class:
//   value    a complete product that differs from a*b
//   code     a dual-rail bit with both rails high
//   glitch   a rail rising while the sink acknowledges, or falling before it
//            does (a protocol violation on the output channel)
//   deadlock no completion within the run's time limit
//   tokcnt   the number of products differs from TOKENS
// and counted separately for data and control victims.  The source waits
// SRC_DLY after every handshake edge and the sink SNK_DLY, which sets how
// token- or bubble-limited the pipeline runs.
//
// The classes follow the effect classes of the fault-injection study this
// design comes from; the victim lists, the pulse width in simulation time
// units, the run length and the zero-delay gates are this environment's
// own choices, so the counts show tendencies, not the study's numbers.
module tb_set_env
  import qdi_pkg::*;
#(
  parameter int unsigned N       = 4,
  parameter int unsigned OPS     = 1,
  parameter buf_style_e  STYLE   = BUF_WCHB,
  parameter bit          DD      = 1'b0,
  parameter int unsigned RUNS    = 60,
  parameter int unsigned TOKENS  = 6,
  parameter int unsigned SRC_DLY = 2,
  parameter int unsigned SNK_DLY = 4,
  parameter int unsigned PW      = 1,
  parameter int unsigned SEED    = 1
) (
  output logic finished,
  output int   golden_effects,
  output int   inj_data, inj_ctrl,
  output int   eff_data, eff_ctrl,
  output int   n_value, n_code, n_glitch, n_deadlock, n_tokcnt
);

  // Victim numbering: sum rails before buffers 1..N, sum rails after
  // buffers 1..N-1, then the acknowledges of buffers 1..N.
  localparam int unsigned NPC = N * 2 * N * 2;
  localparam int unsigned NQC = (N - 1) * 2 * N * 2;
  localparam int unsigned NDATA = NPC + NQC;
  localparam int unsigned NCTRL = N;

  // Declaration initialisers: the source and sink processes must see go low
  // at time 0, before the engine's first statement runs.
  logic           rst = 1'b1, go = 1'b0, abort = 1'b0, pulse = 1'b0;
  int unsigned    tsel = '1;
  logic [N-1:0]   a_t, a_f, b_t, b_f;
  logic [2*N-1:0] p_t, p_f, p2_t, p2_f;
  logic           ack_all, nack_all, out_ack;
  logic [N-1:0]   op_a [TOKENS], op_b [TOKENS];
  int unsigned    nrecv = 0;
  logic           src_idle, snk_idle;
  logic           f_value = 1'b0, f_code = 1'b0, f_glitch = 1'b0;
  time            t_last = 0;

  // ---------------------------------------------------------------- DUT
  if (DD) begin : g_dd
    logic in_ack_a, in_ack_b;
    mul_pipelined_dd #(.N(N), .OPS(OPS)) u_dut (
      .rst,
      .in_a_t_a (a_t), .in_a_f_a (a_f), .in_b_t_a (b_t), .in_b_f_a (b_f),
      .in_a_t_b (a_t), .in_a_f_b (a_f), .in_b_t_b (b_t), .in_b_f_b (b_f),
      .in_ack_a, .in_ack_b,
      .out_p_t_a (p_t), .out_p_f_a (p_f), .out_p_t_b (p2_t), .out_p_f_b (p2_f),
      .out_ack_a (out_ack), .out_ack_b (out_ack));
    assign ack_all  = in_ack_a & in_ack_b;
    assign nack_all = !in_ack_a & !in_ack_b;

    for (genvar k = 1; k <= N; k++) begin : g_k
      for (genvar j = 0; j < 2 * N; j++) begin : g_j
        localparam int unsigned IDP = ((k - 1) * 2 * N + j) * 2;
        localparam int unsigned IDQ = NPC + ((k - 1) * 2 * N + j) * 2;
        logic v;
        always @(posedge pulse) begin
          if (tsel == IDP) begin
            v = u_dut.p_t[0][k][2*N+j];
            force u_dut.p_t[0][k][2*N+j] = !v;
            #(PW) release u_dut.p_t[0][k][2*N+j];
          end else if (tsel == IDP + 1) begin
            v = u_dut.p_f[0][k][2*N+j];
            force u_dut.p_f[0][k][2*N+j] = !v;
            #(PW) release u_dut.p_f[0][k][2*N+j];
          end
        end
        if (k < N) begin : g_q
          always @(posedge pulse) begin
            if (tsel == IDQ) begin
              v = u_dut.q_t[0][k][2*N+j];
              force u_dut.q_t[0][k][2*N+j] = !v;
              #(PW) release u_dut.q_t[0][k][2*N+j];
            end else if (tsel == IDQ + 1) begin
              v = u_dut.q_f[0][k][2*N+j];
              force u_dut.q_f[0][k][2*N+j] = !v;
              #(PW) release u_dut.q_f[0][k][2*N+j];
            end
          end
        end
      end
      logic w;
      always @(posedge pulse) begin
        if (tsel == NDATA + k - 1) begin
          w = u_dut.back[0][k];
          force u_dut.back[0][k] = !w;
          #(PW) release u_dut.back[0][k];
        end
      end
    end
  end else begin : g_sr
    logic in_ack;
    mul_pipelined #(.N(N), .OPS(OPS), .STYLE(STYLE)) u_dut (
      .rst, .in_a_t(a_t), .in_a_f(a_f), .in_b_t(b_t), .in_b_f(b_f),
      .in_ack, .out_p_t(p_t), .out_p_f(p_f), .out_ack);
    assign p2_t     = p_t;
    assign p2_f     = p_f;
    assign ack_all  = in_ack;
    assign nack_all = !in_ack;

    for (genvar k = 1; k <= N; k++) begin : g_k
      for (genvar j = 0; j < 2 * N; j++) begin : g_j
        localparam int unsigned IDP = ((k - 1) * 2 * N + j) * 2;
        localparam int unsigned IDQ = NPC + ((k - 1) * 2 * N + j) * 2;
        logic v;
        always @(posedge pulse) begin
          if (tsel == IDP) begin
            v = u_dut.pc_t[k][j];
            force u_dut.pc_t[k][j] = !v;
            #(PW) release u_dut.pc_t[k][j];
          end else if (tsel == IDP + 1) begin
            v = u_dut.pc_f[k][j];
            force u_dut.pc_f[k][j] = !v;
            #(PW) release u_dut.pc_f[k][j];
          end
        end
        if (k < N) begin : g_q
          always @(posedge pulse) begin
            if (tsel == IDQ) begin
              v = u_dut.qc_t[k][j];
              force u_dut.qc_t[k][j] = !v;
              #(PW) release u_dut.qc_t[k][j];
            end else if (tsel == IDQ + 1) begin
              v = u_dut.qc_f[k][j];
              force u_dut.qc_f[k][j] = !v;
              #(PW) release u_dut.qc_f[k][j];
            end
          end
        end
      end
      logic w;
      always @(posedge pulse) begin
        if (tsel == NDATA + k - 1) begin
          w = u_dut.back[k];
          force u_dut.back[k] = !w;
          #(PW) release u_dut.back[k];
        end
      end
    end
  end

  // ------------------------------------------------------------- source
  initial begin
    a_t = '0; a_f = '0; b_t = '0; b_f = '0;
    forever begin
      src_idle = 1'b1;
      wait (go);
      src_idle = 1'b0;
      for (int unsigned i = 0; i < TOKENS; i++) begin
        a_t = op_a[i]; a_f = ~op_a[i];
        b_t = op_b[i]; b_f = ~op_b[i];
        wait (ack_all || abort);
        if (abort) break;
        #(SRC_DLY);
        a_t = '0; a_f = '0; b_t = '0; b_f = '0;
        wait (nack_all || abort);
        if (abort) break;
        #(SRC_DLY);
      end
      wait (abort);
      a_t = '0; a_f = '0; b_t = '0; b_f = '0;
      src_idle = 1'b1;
      wait (!go);
    end
  end

  // --------------------------------------------------------------- sink
  initial begin
    logic [2*N-1:0] expect_p;
    out_ack = 1'b0;
    nrecv   = 0;
    forever begin
      snk_idle = 1'b1;
      wait (go);
      snk_idle = 1'b0;
      forever begin
        wait (((p_t ^ p_f) == '1 && (p2_t ^ p2_f) == '1) || abort);
        if (abort) break;
        #(SNK_DLY);
        if (nrecv < TOKENS) begin
          expect_p = (2*N)'(op_a[nrecv]) * (2*N)'(op_b[nrecv]);
          if (p_t !== expect_p || p_f !== ~expect_p ||
              p2_t !== expect_p || p2_f !== ~expect_p) f_value = 1'b1;
        end
        nrecv++;
        out_ack = 1'b1;
        wait ((p_t == '0 && p_f == '0 && p2_t == '0 && p2_f == '0) || abort);
        if (abort) break;
        #(SNK_DLY);
        out_ack = 1'b0;
        t_last  = $time;
      end
      wait (abort);
      out_ack  = 1'b0;
      snk_idle = 1'b1;
      wait (!go);
    end
  end

  // ----------------------------------------------------------- monitors
  logic [2*N-1:0] prev_t = '0, prev_f = '0, prev2_t = '0, prev2_f = '0;
  always @(p_t or p_f or p2_t or p2_f) begin
    if (go) begin
      if ((p_t & p_f) != '0 || (p2_t & p2_f) != '0) f_code = 1'b1;
      if (out_ack && ((p_t & ~prev_t) != '0 || (p_f & ~prev_f) != '0 ||
                      (p2_t & ~prev2_t) != '0 || (p2_f & ~prev2_f) != '0))
        f_glitch = 1'b1;
      if (!out_ack && ((prev_t & ~p_t) != '0 || (prev_f & ~p_f) != '0 ||
                       (prev2_t & ~p2_t) != '0 || (prev2_f & ~p2_f) != '0))
        f_glitch = 1'b1;
    end
    prev_t = p_t; prev_f = p_f; prev2_t = p2_t; prev2_f = p2_f;
  end

  // ------------------------------------------------------------- engine
  initial begin
    time         t0, golden_len, limit, tinj;
    logic        injected, is_ctrl, f_dead, any;
    finished = 1'b0;
    golden_effects = 0;
    inj_data = 0; inj_ctrl = 0; eff_data = 0; eff_ctrl = 0;
    n_value = 0; n_code = 0; n_glitch = 0; n_deadlock = 0; n_tokcnt = 0;
    go = 1'b0; abort = 1'b0; pulse = 1'b0; tsel = '1;
    golden_len = 0;
    rst = 1'b1;
    void'($urandom(SEED));
    for (int unsigned run = 0; run <= RUNS; run++) begin
      for (int unsigned i = 0; i < TOKENS; i++) begin
        op_a[i] = N'($urandom());
        op_b[i] = N'($urandom());
      end
      is_ctrl = ($urandom_range(0, 2) == 0);
      tsel    = is_ctrl ? NDATA + $urandom_range(0, NCTRL - 1)
                        : $urandom_range(0, NDATA - 1);
      rst = 1'b1;
      #5;
      rst = 1'b0;
      #1;
      f_value = 1'b0; f_code = 1'b0; f_glitch = 1'b0;
      nrecv  = 0;
      t_last = $time;
      injected = 1'b0;
      limit = (run == 0) ? 100000 : 3 * golden_len + 40;
      tinj  = (run == 0) ? 0 : 1 + time'($urandom_range(0, int'(golden_len)));
      t0 = $time;
      go = 1'b1;
      forever begin
        #1;
        if (run != 0 && !injected && $time - t0 >= tinj) begin
          pulse = 1'b1;
          injected = 1'b1;
        end else pulse = 1'b0;
        if ($time - t0 > limit) break;
        if (nrecv >= TOKENS && !out_ack && $time - t_last >= 30) break;
      end
      f_dead = ($time - t0 > limit);
      if (run == 0) golden_len = t_last - t0;
      abort = 1'b1;
      wait (src_idle && snk_idle);
      pulse = 1'b0;
      go = 1'b0;
      #1;
      abort = 1'b0;
      any = f_value || f_code || f_glitch || f_dead || (nrecv != TOKENS);
      if (run == 0) begin
        golden_effects = int'(any);
      end else begin
        if (is_ctrl) begin inj_ctrl++; eff_ctrl += int'(any); end
        else         begin inj_data++; eff_data += int'(any); end
        n_value    += int'(f_value);
        n_code     += int'(f_code);
        n_glitch   += int'(f_glitch);
        n_deadlock += int'(f_dead);
        n_tokcnt   += int'(nrecv != TOKENS);
      end
    end
    rst = 1'b1;
    finished = 1'b1;
  end

endmodule
