// tb_buf_dd_wchb: self-checking test of buf_dd_wchb (W = 8).
//
// Both channel copies carry the same 60 random tokens (fast and slow sink)
// and both output copies are checked.  Then single-signal pulses are
// injected into one copy only: a rail pulse into the empty buffer, a pulse
// on the other rail of a held bit, and a pulse on one copy's ack_in.  None
// of them may change what the buffer stores or emits, and the buffer must
// still carry a token correctly afterwards.
module tb_buf_dd_wchb;

  localparam int unsigned W = 8;
  logic         rst;
  logic [W-1:0] ia_t, ia_f, ib_t, ib_f, oa_t, oa_f, ob_t, ob_f;
  logic         aoa, aob, aia, aib;
  int           checks = 0, failures = 0;

  buf_dd_wchb #(.W(W)) dut (
    .rst, .in_a_t(ia_t), .in_a_f(ia_f), .in_b_t(ib_t), .in_b_f(ib_f),
    .ack_out_a(aoa), .ack_out_b(aob),
    .out_a_t(oa_t), .out_a_f(oa_f), .out_b_t(ob_t), .out_b_f(ob_f),
    .ack_in_a(aia), .ack_in_b(aib));

  task automatic check(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic put(input logic [W-1:0] v, input bit valid);
    ia_t = valid ? v : '0; ia_f = valid ? ~v : '0;
    ib_t = ia_t; ib_f = ia_f;
  endtask

  task automatic stream(input int n, input int rdly);
    logic [W-1:0] q[$];
    fork
      for (int i = 0; i < n; i++) begin
        logic [W-1:0] v;
        v = W'($urandom());
        q.push_back(v);
        put(v, 1'b1);
        wait (aoa && aob);
        #1 put('0, 1'b0);
        wait (!aoa && !aob);
        #1;
      end
      for (int i = 0; i < n; i++) begin
        logic [W-1:0] e;
        wait ((oa_t ^ oa_f) == '1 && (ob_t ^ ob_f) == '1);
        #(rdly);
        e = q.pop_front();
        check(oa_t == e && oa_f == ~e && ob_t == e && ob_f == ~e, $sformatf("token %0d", i));
        aia = 1'b1; aib = 1'b1;
        wait (oa_t == '0 && oa_f == '0 && ob_t == '0 && ob_f == '0);
        #(rdly);
        aia = 1'b0; aib = 1'b0;
      end
    join
  endtask

  initial begin
    put('0, 1'b0); aia = 1'b0; aib = 1'b0;
    rst = 1'b1;
    #5 rst = 1'b0;
    #5;
    stream(30, 1);
    stream(30, 7);
    // Pulse on one copy's rail into the empty buffer.
    ia_t[0] = 1'b1; #2;
    check(oa_t[0] == 1'b0 && ob_t[0] == 1'b0, "single-copy pulse into empty buffer is blocked");
    ia_t[0] = 1'b0; #2;
    check(oa_t == '0 && ob_t == '0 && !aoa && !aob, "buffer still empty after the pulse");
    // Hold a token, then pulse the other rail of bit 0 in copy B only.
    put(8'h01, 1'b1); #3;
    check(aoa && aob && oa_t == 8'h01, "token held");
    ib_f[0] = 1'b1; #2;
    check(oa_f[0] == 1'b0 && ob_f[0] == 1'b0, "pulse on the other rail is blocked");
    ib_f[0] = 1'b0;
    // Pulse on copy A's ack_in while the token is held.
    put('0, 1'b0);
    aia = 1'b1; #2;
    check(oa_t == 8'h01 && ob_t == 8'h01 && aoa, "single-copy acknowledge does not release the token");
    aia = 1'b0; #2;
    // Proper release.
    aia = 1'b1; aib = 1'b1; #3;
    check(oa_t == '0 && oa_f == '0 && !aoa && !aob, "released by both acknowledges");
    aia = 1'b0; aib = 1'b0; #3;
    stream(10, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
