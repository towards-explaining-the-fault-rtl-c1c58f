// tb_mul_driver: four-phase source, sink and scoreboard for a dual-rail
// multiplier channel pair (operands a, b in; product p out).
//
// The source sends NOPS operand pairs: a few corner cases first (0, 1, all
// ones) and then values from $urandom with seed SEED.  For each it drives a
// complete dual-rail word, waits for in_ack to rise, waits SRC_DLY, drives
// the spacer, waits for in_ack to fall and waits SRC_DLY again.  The sink
// waits for a complete product word, waits SNK_DLY, compares it with a*b
// computed here with ordinary integer arithmetic, raises out_ack, waits for
// the spacer, waits SNK_DLY and lowers out_ack.  Large SNK_DLY makes the
// pipeline bubble-limited (tokens pile up), large SRC_DLY token-limited.
//
// Monitors count the output codes that are illegal (both rails of a bit
// high), the largest number of tokens in flight, and how often the source
// found in_ack late (a stall).  done rises after the last product.
module tb_mul_driver #(
  parameter int unsigned N       = 8,
  parameter int unsigned NOPS    = 20,
  parameter int unsigned SRC_DLY = 3,
  parameter int unsigned SNK_DLY = 3,
  parameter int unsigned SEED    = 1
) (
  input  logic           rst,
  output logic [N-1:0]   a_t, a_f, b_t, b_f,
  input  logic           in_ack,
  input  logic [2*N-1:0] p_t, p_f,
  output logic           out_ack,
  output logic           done,
  output int             checks,
  output int             failures,
  output int             illegal_codes,
  output int             max_in_flight,
  output int             stalls
);

  logic [N-1:0]   op_a [NOPS];
  logic [N-1:0]   op_b [NOPS];
  int             sent, received;

  function automatic logic [N-1:0] pick(int unsigned i, int unsigned which);
    logic [N-1:0] v;
    case (i)
      0: v = '0;
      1: v = (which == 0) ? '1 : {{(N-1){1'b0}}, 1'b1};
      2: v = '1;
      default: v = N'($urandom());
    endcase
    return v;
  endfunction

  initial begin
    void'($urandom(SEED));
    for (int unsigned i = 0; i < NOPS; i++) begin
      op_a[i] = pick(i, 0);
      op_b[i] = pick(i, 1);
    end
  end

  // Source.
  initial begin
    a_t = '0; a_f = '0; b_t = '0; b_f = '0;
    sent = 0;
    @(negedge rst);
    #(SRC_DLY);
    for (int unsigned i = 0; i < NOPS; i++) begin
      a_t = op_a[i]; a_f = ~op_a[i];
      b_t = op_b[i]; b_f = ~op_b[i];
      sent++;
      #1;
      if (!in_ack) stalls++;
      wait (in_ack);
      #(SRC_DLY);
      a_t = '0; a_f = '0; b_t = '0; b_f = '0;
      wait (!in_ack);
      #(SRC_DLY);
    end
  end

  // Sink and scoreboard.
  initial begin
    logic [2*N-1:0] expect_p;
    out_ack  = 1'b0;
    done     = 1'b0;
    checks   = 0;
    failures = 0;
    received = 0;
    @(negedge rst);
    for (int unsigned i = 0; i < NOPS; i++) begin
      wait ((p_t ^ p_f) == '1 && (p_t & p_f) == '0);
      #(SNK_DLY);
      expect_p = (2*N)'(op_a[i]) * (2*N)'(op_b[i]);
      checks++;
      if (p_t !== expect_p || p_f !== ~expect_p) begin
        failures++;
        $display("product %0d: %0d * %0d gave %0d, expected %0d",
                 i, op_a[i], op_b[i], p_t, expect_p);
      end
      received++;
      out_ack = 1'b1;
      wait (p_t == '0 && p_f == '0);
      #(SNK_DLY);
      out_ack = 1'b0;
    end
    done = 1'b1;
  end

  // Output monitors.
  initial begin
    illegal_codes = 0;
    max_in_flight = 0;
    stalls        = 0;
  end
  always @(p_t or p_f) if (!rst && (p_t & p_f) != '0) illegal_codes++;
  always @(sent or received) if (sent - received > max_in_flight) max_in_flight = sent - received;

endmodule
