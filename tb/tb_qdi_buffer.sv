// tb_qdi_buffer: self-checking test of the qdi_buffer style switch.
//
// Five qdi_buffer instances (W = 8), one per style, each with its own
// four-phase source and sink carrying 30 random tokens in order.  Then a
// pulse on one rail is sent into every empty buffer: only the plain WCHB,
// interlocking and deadlocking styles may keep it; the dual-CD style must
// block it and the Mousetrap style must let it pass without storing it.
// This tells that each instance really is the style it was asked for.
module tb_qdi_buffer;
  import qdi_pkg::*;

  localparam int unsigned W = 8;
  localparam int unsigned NS = 5;
  localparam buf_style_e STY [NS] = '{BUF_WCHB, BUF_INTERLOCKING,
      BUF_DEADLOCKING, BUF_DUALCD, BUF_MTD};
  localparam bit KEEPS [NS] = '{1'b1, 1'b1, 1'b1, 1'b0, 1'b0};

  logic rst;
  logic glitch;
  int   checks = 0, failures = 0;
  logic done [NS];
  logic kept [NS];

  for (genvar s = 0; s < NS; s++) begin : g_s
    logic [W-1:0] in_t, in_f, out_t, out_f;
    logic ack_out, ack_in;
    logic [W-1:0] q[$];

    qdi_buffer #(.STYLE(STY[s]), .W(W)) dut (
      .rst, .in_t, .in_f, .ack_out, .out_t, .out_f, .ack_in);

    initial begin
      in_t = '0; in_f = '0;
      @(negedge rst);
      for (int i = 0; i < 30; i++) begin
        logic [W-1:0] v;
        v = W'($urandom());
        q.push_back(v);
        in_t = v; in_f = ~v;
        wait (ack_out);
        #(1 + s);
        in_t = '0; in_f = '0;
        wait (!ack_out);
        #1;
      end
      wait (glitch);
      in_t[0] = 1'b1;
      #2;
      in_t[0] = 1'b0;
      #2;
      kept[s] = out_t[0];
    end

    initial begin
      done[s] = 1'b0;
      ack_in = 1'b0;
      @(negedge rst);
      for (int i = 0; i < 30; i++) begin
        logic [W-1:0] e;
        wait ((out_t ^ out_f) == '1);
        #3;
        e = q.pop_front();
        checks++;
        if (out_t != e || out_f != ~e) failures++;
        ack_in = 1'b1;
        wait (out_t == '0 && out_f == '0);
        #2;
        ack_in = 1'b0;
      end
      done[s] = 1'b1;
    end
  end

  initial begin
    glitch = 1'b0;
    rst = 1'b1;
    #5 rst = 1'b0;
    for (int s = 0; s < int'(NS); s++) wait (done[s]);
    #5 glitch = 1'b1;
    #10;
    for (int s = 0; s < int'(NS); s++) begin
      checks++;
      if (kept[s] != KEEPS[s]) begin
        failures++;
        $display("FAIL: style %0d kept=%b", s, kept[s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
