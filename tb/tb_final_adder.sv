// tb_final_adder: random and corner operands for the default 17-bit adder;
// y must equal x0 + x1 modulo 2^17.
module tb_final_adder;
  localparam int W = 17;
  logic [W-1:0] x0, x1, y;
  int checks = 0, failures = 0;

  final_adder dut (.x0, .x1, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    #1;
    checks++;
    if (y !== W'(x0 + x1)) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h = %h", x0, x1, y);
    end
  endtask

  initial begin
    x0 = '1; x1 = W'(1); check_one();
    x0 = '1; x1 = '1;    check_one();
    x0 = '0; x1 = '0;    check_one();
    x0 = W'(17'h0AAAA); x1 = W'(17'h15555); check_one();
    for (int t = 0; t < 50000; t++) begin
      x0 = W'($urandom);
      x1 = W'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
