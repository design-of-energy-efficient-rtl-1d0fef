// tb_comp22: exhaustive check of the 2:2 compressor: in1 + in2 must equal
// out1 + 2*out2 for all four input pairs.
module tb_comp22;
  logic in1, in2, out1, out2;
  int checks = 0, failures = 0;

  comp22 dut (.in1, .in2, .out1, .out2);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {in2, in1} = 2'(v);
      #1;
      checks++;
      if (int'(in1) + int'(in2) != int'(out1) + 2 * int'(out2)) begin
        failures++;
        $display("FAIL in=%b%b out=%b%b", in2, in1, out2, out1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
