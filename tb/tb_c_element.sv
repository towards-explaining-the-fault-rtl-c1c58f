// tb_c_element: self-checking test of c_element.
//
// A 3-input instance is driven with random input vectors; after every change
// the output is compared with a reference model (all ones -> 1, all zeros
// -> 0, otherwise unchanged).  A 2-input instance with RST_VAL = 1 checks
// that reset forces the output and that it then follows its inputs.
module tb_c_element;

  logic       rst;
  logic [2:0] in3;
  logic [1:0] in2;
  logic       out3, out2, model;
  int         checks = 0, failures = 0;

  c_element #(.N(3)) dut3 (.rst(rst), .in(in3), .out(out3));
  c_element #(.N(2), .RST_VAL(1'b1)) dut2 (.rst(rst), .in(in2), .out(out2));

  initial begin
    rst = 1'b1; in3 = '0; in2 = '0;
    #2;
    checks++; if (out3 !== 1'b0) failures++;
    checks++; if (out2 !== 1'b1) failures++;   // reset value, inputs disagree with it
    rst = 1'b0;
    #2;
    checks++; if (out2 !== 1'b0) failures++;   // all inputs zero
    model = 1'b0;
    for (int i = 0; i < 400; i++) begin
      in3 = 3'($urandom());
      #1;
      if (in3 == 3'b111) model = 1'b1;
      else if (in3 == 3'b000) model = 1'b0;
      checks++;
      if (out3 !== model) begin
        failures++;
        $display("FAIL: in=%b out=%b expected %b", in3, out3, model);
      end
    end
    in2 = 2'b01; #1; checks++; if (out2 !== 1'b0) failures++;
    in2 = 2'b11; #1; checks++; if (out2 !== 1'b1) failures++;
    in2 = 2'b10; #1; checks++; if (out2 !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
