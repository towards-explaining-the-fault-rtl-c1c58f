// tb_buf_common.svh: signals and tasks shared by the buffer testbenches.
// Included inside a testbench module that instantiates one W-bit buffer on
// in_t/in_f/ack_out/out_t/out_f/ack_in/rst.
//
//   stream(n, sdly, rdly): n random tokens through the buffer with the
//       four-phase protocol, source delay sdly, sink delay rdly; every
//       output word is compared with what was sent, in order.
//   half_buffer_check(): with the successor not acknowledging, the buffer
//       must take one token, keep it when its input returns to null, and
//       release it (output null, ack_out low) only after ack_in rises.
//   glitch_on_held(): buffer holds a token whose bit 0 is 1, ack_in low; a
//       pulse on in_f[0] arrives.  Returns out_f[0] during and after the
//       pulse, and whether the buffer still empties after ack_in and a spacer.
//   glitch_on_empty(): buffer empty, ack_in low, a pulse on in_t[0] alone.
//       Returns out_t[0] during and after the pulse.

localparam int unsigned W = 8;

logic         rst;
logic [W-1:0] in_t, in_f, out_t, out_f;
logic         ack_out, ack_in;
int           checks = 0;
int           failures = 0;

task automatic check(input bit cond, input string msg);
  checks++;
  if (!cond) begin
    failures++;
    $display("FAIL: %s", msg);
  end
endtask

task automatic do_reset();
  in_t = '0; in_f = '0; ack_in = 1'b0;
  rst = 1'b1;
  #5 rst = 1'b0;
  #5;
endtask

task automatic stream(input int n, input int sdly, input int rdly);
  logic [W-1:0] q[$];
  fork
    begin : src
      for (int i = 0; i < n; i++) begin
        logic [W-1:0] v;
        v = W'($urandom());
        q.push_back(v);
        in_t = v; in_f = ~v;
        wait (ack_out);
        #(sdly);
        in_t = '0; in_f = '0;
        wait (!ack_out);
        #(sdly);
      end
    end
    begin : snk
      for (int i = 0; i < n; i++) begin
        logic [W-1:0] e;
        wait ((out_t ^ out_f) == '1);
        #(rdly);
        e = q.pop_front();
        check(out_t == e && out_f == ~e, $sformatf("token %0d: got %h expected %h", i, out_t, e));
        ack_in = 1'b1;
        wait (out_t == '0 && out_f == '0);
        #(rdly);
        ack_in = 1'b0;
      end
    end
  join
endtask

task automatic half_buffer_check();
  logic [W-1:0] v;
  v = 8'h5a;
  do_reset();
  check(out_t == '0 && out_f == '0 && !ack_out, "reset leaves the buffer empty");
  in_t = v; in_f = ~v;
  #5;
  check(ack_out && out_t == v && out_f == ~v, "token captured and acknowledged");
  in_t = '0; in_f = '0;
  #5;
  check(ack_out && out_t == v, "token kept while the successor has not acknowledged");
  ack_in = 1'b1;
  #5;
  check(!ack_out && out_t == '0 && out_f == '0, "spacer taken after ack_in");
  ack_in = 1'b0;
  #5;
endtask

task automatic glitch_on_held(output bit during, output bit after, output bit empties);
  do_reset();
  in_t = 8'h01; in_f = 8'hfe;
  #5;
  in_f[0] = 1'b1;
  #2;
  during = out_f[0];
  in_f[0] = 1'b0;
  #3;
  after = out_f[0];
  ack_in = 1'b1;
  in_t = '0; in_f = '0;
  #10;
  empties = (out_t == '0 && out_f == '0 && !ack_out);
  ack_in = 1'b0;
  #5;
endtask

task automatic glitch_on_empty(output bit during, output bit after);
  do_reset();
  in_t[0] = 1'b1;
  #2;
  during = out_t[0];
  in_t[0] = 1'b0;
  #3;
  after = out_t[0];
endtask

initial begin
  #200000;
  $display("watchdog: simulation did not finish");
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
  $finish;
end
