// tb_aaac_top: end-to-end test of the whole design at its default size
// (16-bit operands, no parameter overrides).
//
// The multiplier pair and the squarer pair are driven at the same time with
// random and targeted operands; every output is compared with the arithmetic
// reference model. The test counts how often each mechanism of the design
// was exercised and fails if any never was:
//   - each of the five multiplier ECU cases and three groups
//   - each of the ten squarer ECU cases and seven groups
//   - a negative product, a carry of the compensation into the kept columns
//     (fixed-width output differs from plain truncation of the kept part)
//   - each of the seven compensation values (groups) of the squarer with
//     extra signatures, and an operand where its output differs from the
//     basic squarer's. Its reference table is rebuilt here from the
//     arithmetic model (min-max-error theta per group).
// The design is combinational; each vector is checked 1 time unit after it
// is applied.
module tb_aaac_top;
  import aaac_ref_pkg::*;
  import aaac_pkg::mult_group_e;

  logic [15:0] mul_a, mul_b, mul_p_fixed, sq_a, sq_p_fixed;
  logic [31:0] mul_p_full, sq_p_full;
  logic [2:0]  mul_case;
  mult_group_e mul_group;
  logic [3:0]  sq_case;
  logic [2:0]  sq_group;
  logic [15:0] sq_p_xsig;
  logic [2:0]  sq_xsig_group;
  int_da_t     xtbl;

  int checks = 0, failures = 0;
  int mcase [1:5], mgrp [1:3], scase [1:10], sgrp [1:7];
  int neg_products = 0, comp_carries = 0, xsig_differs = 0;
  int xgrp [1:7];

  aaac_top dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [15:0] a, logic [15:0] b, logic [15:0] s);
    mult_info_t m;
    sq_info_t   q;
    longint     kept;
    int         xt;
    mul_a = a; mul_b = b; sq_a = s;
    #1;
    m = mult_info(a, b);
    q = sq_info(s);
    checks++;
    if (mul_p_fixed !== mult_fixed_ref(a, b) || mul_p_full !== mult_full_ref(a, b) ||
        int'(mul_case) != m.case_no || int'(mul_group) != m.group) begin
      failures++;
      if (failures < 10) $display("FAIL multiplier a=%h b=%h", a, b);
    end
    checks++;
    if (sq_p_fixed !== sq_fixed_ref(s) || sq_p_full !== sq_full_ref(s) ||
        int'(sq_case) != q.case_no || int'(sq_group) != q.group) begin
      failures++;
      if (failures < 10) $display("FAIL squarer a=%h", s);
    end
    checks++;
    xt = xtbl[sq_xsig_index(s, 7)];
    if (sq_p_xsig !== sq_xsig_fixed_ref(s, xt) || int'(sq_xsig_group) != xt + 1) begin
      failures++;
      if (failures < 10) $display("FAIL extra-signature squarer a=%h", s);
    end
    xgrp[xt + 1]++;
    if (sq_p_xsig != sq_p_fixed) xsig_differs++;
    mcase[m.case_no]++;
    mgrp[m.group]++;
    scase[q.case_no]++;
    sgrp[q.group]++;
    if (mult_exact(a, b) < 0) neg_products++;
    kept = mult_exact(a, b) - m.tpl;
    if (mul_p_fixed !== 16'(kept >>> 16)) comp_carries++;
  endtask

  task automatic need(string what, int count);
    checks++;
    $display("%-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL %s never happened", what);
    end
  endtask

  initial begin
    foreach (mcase[k]) mcase[k] = 0;
    foreach (mgrp[k])  mgrp[k]  = 0;
    foreach (scase[k]) scase[k] = 0;
    foreach (sgrp[k])  sgrp[k]  = 0;
    foreach (xgrp[k])  xgrp[k]  = 0;
    xtbl = sq_xsig_table(7);
    apply(16'h0000, 16'h0000, 16'h0000);
    apply(16'hFFFF, 16'hFFFF, 16'hFFFF);
    apply(16'h8000, 16'h8000, 16'h8000);
    apply(16'h7FFF, 16'h8000, 16'h7FFF);
    for (int t = 0; t < 50000; t++)
      apply(16'($urandom), 16'($urandom), 16'($urandom));
    // multiplier words with few non-zero Booth digits, sparse multiplicands
    for (int t = 0; t < 3000; t++)
      apply(16'h0001 << $urandom_range(0, 15), 16'h5555 & 16'($urandom), 16'($urandom) & 16'($urandom));
    for (int t = 0; t < 3000; t++)
      apply(16'($urandom), 16'hFFFF << $urandom_range(0, 15), 16'($urandom) | 16'($urandom));
    for (int k = 1; k <= 5; k++)  need($sformatf("multiplier ECU case %0d", k), mcase[k]);
    for (int k = 1; k <= 3; k++)  need($sformatf("multiplier ECU group %0d", k), mgrp[k]);
    for (int k = 1; k <= 10; k++) need($sformatf("squarer ECU case %0d", k), scase[k]);
    for (int k = 1; k <= 7; k++)  need($sformatf("squarer ECU group %0d", k), sgrp[k]);
    for (int k = 1; k <= 7; k++)  need($sformatf("extra-signature group %0d", k), xgrp[k]);
    need("extra signatures change result", xsig_differs);
    need("negative product", neg_products);
    need("compensation carry", comp_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
