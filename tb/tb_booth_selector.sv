// tb_booth_selector: drives the selection cell with every legal combination
// of operand bits and encoder controls (s and d never both set) and checks the
// bit against the intended partial product: the magnitude bit of 0, A or 2A,
// inverted for a negative row.
module tb_booth_selector;
  logic a_j, a_jm1, s, d, neg, pp;
  int checks = 0, failures = 0;

  booth_selector dut (.a_j, .a_jm1, .s, .d, .neg, .pp);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic mag, exp_bit;
      {neg, d, s, a_jm1, a_j} = 5'(v);
      if (s && d) continue;
      #1;
      mag     = s ? a_j : (d ? a_jm1 : 1'b0);
      exp_bit = neg ? !mag : mag;
      checks++;
      if (pp !== exp_bit) begin
        failures++;
        $display("FAIL neg=%b d=%b s=%b a_jm1=%b a_j=%b pp=%b", neg, d, s, a_jm1, a_j, pp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
