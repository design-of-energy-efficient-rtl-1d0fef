// tb_mult_signature_gen: drives the signature generator with random encoder
// flags and multiplicands plus the corner words, and checks CA (count of z),
// CB (count of n) and FA (at least 8 of 16 multiplicand bits set).
module tb_mult_signature_gen;
  logic [7:0]  z, n;
  logic [15:0] a;
  logic [3:0]  ca, cb;
  logic        fa;
  int checks = 0, failures = 0;

  mult_signature_gen dut (.z, .n, .a, .ca, .cb, .fa);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    #1;
    checks++;
    if (int'(ca) != $countones(z) || int'(cb) != $countones(n) ||
        fa != ($countones(a) >= 8)) begin
      failures++;
      if (failures < 10) $display("FAIL z=%b n=%b a=%h ca=%0d cb=%0d fa=%b", z, n, a, ca, cb, fa);
    end
  endtask

  initial begin
    z = '0; n = '0; a = '0; check_one();
    z = '1; n = '1; a = '1; check_one();
    a = 16'h00FF; check_one();      // exactly 8 ones
    a = 16'h007F; check_one();      // 7 ones
    a = 16'h8421; check_one();
    for (int t = 0; t < 20000; t++) begin
      z = 8'($urandom);
      n = 8'($urandom);
      a = 16'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
