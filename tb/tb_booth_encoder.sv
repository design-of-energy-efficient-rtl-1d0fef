// tb_booth_encoder: checks the radix-4 Booth encoder against its truth table
// (bits b(2i+1) b(2i) b(2i-1) -> z c n d s) for all eight patterns.
module tb_booth_encoder;
  logic b_hi, b_mid, b_lo, s, d, n, z, c;
  int checks = 0, failures = 0;

  // expected {z, c, n, d, s} indexed by {b_hi, b_mid, b_lo}
  localparam logic [4:0] EXP [8] = '{
    5'b10000,   // 000 : 0
    5'b00001,   // 001 : +A
    5'b00001,   // 010 : +A
    5'b00010,   // 011 : +2A
    5'b01110,   // 100 : -2A
    5'b01101,   // 101 : -A
    5'b01101,   // 110 : -A
    5'b10100    // 111 : 0
  };

  booth_encoder dut (.b_hi, .b_mid, .b_lo, .s, .d, .n, .z, .c);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {b_hi, b_mid, b_lo} = 3'(v);
      #1;
      checks++;
      if ({z, c, n, d, s} != EXP[v]) begin
        failures++;
        $display("FAIL bits=%b got zcnds=%b expected %b", 3'(v), {z, c, n, d, s}, EXP[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
