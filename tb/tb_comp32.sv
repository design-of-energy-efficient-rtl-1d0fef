// tb_comp32: exhaustive check of the 3:2 compressor: in1 + in2 + in3 must
// equal out1 + 2*out2 for all eight input patterns.
module tb_comp32;
  logic in1, in2, in3, out1, out2;
  int checks = 0, failures = 0;

  comp32 dut (.in1, .in2, .in3, .out1, .out2);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {in3, in2, in1} = 3'(v);
      #1;
      checks++;
      if ($countones(3'(v)) != int'(out1) + 2 * int'(out2)) begin
        failures++;
        $display("FAIL in=%b out=%b%b", 3'(v), out2, out1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
