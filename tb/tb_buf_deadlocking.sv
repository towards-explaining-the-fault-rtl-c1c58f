// tb_buf_deadlocking: self-checking test of buf_deadlocking (W = 8).
//
// Runs random token streams with fast and slow sinks, checks the half-buffer
// handshake, and then injects single-rail pulses to check the behaviour
// that sets this style apart: a pulse on the other rail of a held bit is captured, and the buffer then refuses the spacer for good (deadlock).
module tb_buf_deadlocking;
`include "tb_buf_common.svh"

  buf_deadlocking #(.W(W)) dut (
    .rst, .in_t, .in_f, .ack_out, .out_t, .out_f, .ack_in);

  initial begin
    bit hd, ha, he, ed, ea;
    do_reset();
    stream(40, 1, 1);
    stream(40, 1, 9);
    stream(40, 9, 1);
    half_buffer_check();
    glitch_on_held(hd, ha, he);
    check(hd == 1'b1, "pulse on the other rail of a held bit: output rail during the pulse");
    check(ha == 1'b1, "pulse on the other rail of a held bit: output rail after the pulse");
    check(he == 1'b0, "after the pulse: buffer empties on ack_in and spacer");
    glitch_on_empty(ed, ea);
    check(ed == 1'b1, "pulse into an empty buffer: output rail during the pulse");
    check(ea == 1'b1, "pulse into an empty buffer: output rail after the pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
