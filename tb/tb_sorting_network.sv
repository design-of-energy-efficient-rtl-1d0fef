// tb_sorting_network: checks the bit-sorting network at its default size
// (16 inputs) exhaustively over all 65536 inputs and a 7-input instance over
// all 128 inputs. Output bit k must be 1 exactly when more than k inputs are 1.
module tb_sorting_network;
  logic [15:0] in16, out16;
  logic [6:0]  in7, out7;
  int checks = 0, failures = 0;

  sorting_network dut16 (.in(in16), .out(out16));
  sorting_network #(.N(7)) dut7 (.in(in7), .out(out7));

  function automatic logic [15:0] therm16(int cnt);
    logic [15:0] t;
    for (int k = 0; k < 16; k++) t[k] = (cnt > k);
    return t;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in7 = '0;
    for (int v = 0; v < 65536; v++) begin
      in16 = 16'(v);
      #1;
      checks++;
      if (out16 !== therm16($countones(in16))) begin
        failures++;
        if (failures < 10) $display("FAIL in=%h out=%h", in16, out16);
      end
    end
    for (int v = 0; v < 128; v++) begin
      in7 = 7'(v);
      #1;
      checks++;
      if (out7 !== therm16($countones(in7))[6:0]) begin
        failures++;
        if (failures < 10) $display("FAIL in7=%b out7=%b", in7, out7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
