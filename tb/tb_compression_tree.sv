// tb_compression_tree: feeds random rows into the default tree (10 rows of
// 17 bits) and into 9-row and 3-row instances, and checks that the two output
// rows add up to the sum of the input rows modulo 2^W. All-ones rows are
// included to exercise every carry.
module tb_compression_tree;
  localparam int W = 17;
  logic [W-1:0] r10 [10];
  logic [W-1:0] r9  [9];
  logic [W-1:0] r3  [3];
  logic [W-1:0] s10, c10, s9, c9, s3, c3;
  int checks = 0, failures = 0;

  compression_tree dut10 (.rows(r10), .sum_row(s10), .carry_row(c10));
  compression_tree #(.ROWS(9), .W(W)) dut9 (.rows(r9), .sum_row(s9), .carry_row(c9));
  compression_tree #(.ROWS(3), .W(W)) dut3 (.rows(r3), .sum_row(s3), .carry_row(c3));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      logic [W-1:0] e10, e9, e3;
      e10 = '0; e9 = '0; e3 = '0;
      for (int r = 0; r < 10; r++) begin
        r10[r] = (t < 2) ? {W{t[0]}} : W'($urandom);
        e10 += r10[r];
      end
      for (int r = 0; r < 9; r++) begin
        r9[r] = (t < 2) ? {W{t[0]}} : W'($urandom);
        e9 += r9[r];
      end
      for (int r = 0; r < 3; r++) begin
        r3[r] = (t < 2) ? {W{t[0]}} : W'($urandom);
        e3 += r3[r];
      end
      #1;
      checks += 3;
      if (W'(s10 + c10) !== e10) begin failures++; if (failures < 10) $display("FAIL 10 rows t=%0d", t); end
      if (W'(s9 + c9) !== e9)    begin failures++; if (failures < 10) $display("FAIL 9 rows t=%0d", t); end
      if (W'(s3 + c3) !== e3)    begin failures++; if (failures < 10) $display("FAIL 3 rows t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
