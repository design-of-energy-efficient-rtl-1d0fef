// tb_comp42: exhaustive check of the 4:2 (5:3) compressor. For all 32 input
// patterns the count of ones must equal out1 + 2*(out2 + out3), and out3 must
// not depend on in4 or in5 (it may only see in1..in3, so that a row of
// compressors has no rippling lateral carry).
module tb_comp42;
  logic in1, in2, in3, in4, in5, out1, out2, out3;
  int checks = 0, failures = 0;

  comp42 dut (.in1, .in2, .in3, .in4, .in5, .out1, .out2, .out3);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {in5, in4, in3, in2, in1} = 5'(v);
      #1;
      checks++;
      if ($countones(5'(v)) != int'(out1) + 2 * (int'(out2) + int'(out3))) begin
        failures++;
        $display("FAIL in=%b out3=%b out2=%b out1=%b", 5'(v), out3, out2, out1);
      end
      checks++;
      if (out3 != (($countones(3'(v)) >= 2) ? 1'b1 : 1'b0)) begin
        failures++;
        $display("FAIL out3 is not the majority of in1..in3 for in=%b", 5'(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
