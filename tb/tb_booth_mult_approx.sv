// tb_booth_mult_approx: checks the 16x16 approximate Booth multiplier in both
// forms (fixed width, the default, and full width) against the arithmetic
// reference model: corner operands, then random pairs, then pairs built to
// land in every ECU case. Each output must match the model bit for bit, and
// the ECU case and group must match the model's classification. It also
// measures the error against the exact product (in units of the fixed-width
// output LSB, 2^16) and prints E_ave, E_max and E_ms for both forms; the
// fixed-width form must beat plain truncation of the dropped columns.
// The unit is combinational: each vector is checked 1 time unit after it is
// applied.
module tb_booth_mult_approx;
  import aaac_ref_pkg::*;
  import aaac_pkg::mult_group_e;

  localparam int NRAND = 200000;

  logic [15:0] a, b;
  logic [15:0] p_fix;
  logic [31:0] p_full;
  logic [2:0]  case_fix, case_full;
  mult_group_e grp_fix, grp_full;
  int checks = 0, failures = 0;
  int case_hits [1:5];

  real sum_abs_fix = 0, sum_sq_fix = 0, max_fix = 0;
  real sum_abs_full = 0, sum_sq_full = 0, max_full = 0;
  real sum_sq_trunc = 0;
  int  nerr = 0;

  booth_mult_approx dut_fix (.a, .b, .p(p_fix), .ecu_case(case_fix), .ecu_group(grp_fix));
  booth_mult_approx #(.FULL_WIDTH(1'b1)) dut_full (
    .a, .b, .p(p_full), .ecu_case(case_full), .ecu_group(grp_full));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    mult_info_t m;
    logic [15:0] ef;
    logic [31:0] eu;
    real exact, e1, e2, et;
    #1;
    m  = mult_info(a, b);
    ef = mult_fixed_ref(a, b);
    eu = mult_full_ref(a, b);
    case_hits[m.case_no]++;
    checks++;
    if (p_fix !== ef || p_full !== eu || int'(case_fix) != m.case_no ||
        int'(grp_fix) != m.group || case_full != case_fix) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h fixed=%h/%h full=%h/%h case=%0d/%0d group=%0d/%0d",
                 a, b, p_fix, ef, p_full, eu, case_fix, m.case_no, grp_fix, m.group);
    end
    exact = real'(mult_exact(a, b)) / 65536.0;
    e1 = real'($signed(p_fix)) - exact;
    e2 = real'($signed(p_full)) / 65536.0 - exact;
    et = real'(m.tpl) / 65536.0;   // error if the dropped columns were ignored
    nerr++;
    sum_abs_fix  += (e1 < 0) ? -e1 : e1;  sum_sq_fix  += e1 * e1;
    sum_abs_full += (e2 < 0) ? -e2 : e2;  sum_sq_full += e2 * e2;
    sum_sq_trunc += et * et;
    if (((e1 < 0) ? -e1 : e1) > max_fix)  max_fix  = (e1 < 0) ? -e1 : e1;
    if (((e2 < 0) ? -e2 : e2) > max_full) max_full = (e2 < 0) ? -e2 : e2;
  endtask

  initial begin
    logic [15:0] corners [8] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h7FFF,
                                  16'h8000, 16'h5555, 16'hAAAA, 16'h00FF};
    foreach (case_hits[k]) case_hits[k] = 0;
    foreach (corners[i]) foreach (corners[j]) begin
      a = corners[i]; b = corners[j];
      check_one();
    end
    for (int t = 0; t < NRAND; t++) begin
      a = 16'($urandom);
      b = 16'($urandom);
      check_one();
    end
    // mostly-zero Booth digits (multiplier words of runs of equal bits)
    for (int t = 0; t < 2000; t++) begin
      a = 16'($urandom);
      b = ($urandom_range(0, 1) != 0) ? 16'hFFFF << $urandom_range(0, 15)
                                     : 16'h0001 << $urandom_range(0, 15);
      check_one();
    end
    // CA = 1 or 2 with few set multiplicand bits and few negative digits
    for (int t = 0; t < 2000; t++) begin
      a = 16'h0001 << $urandom_range(0, 15);
      b = 16'h5555 & 16'($urandom);
      check_one();
    end
    for (int k = 1; k <= 5; k++) begin
      checks++;
      if (case_hits[k] == 0) begin
        failures++;
        $display("FAIL ECU case %0d never exercised", k);
      end
      $display("ECU case %0d: %0d vectors", k, case_hits[k]);
    end
    $display("fixed width : E_ave=%.4f E_max=%.4f E_ms=%.4f (LSB = 2^16, %0d vectors)",
             sum_abs_fix / nerr, max_fix, sum_sq_fix / nerr, nerr);
    $display("full width  : E_ave=%.4f E_max=%.4f E_ms=%.4f", sum_abs_full / nerr, max_full,
             sum_sq_full / nerr);
    $display("dropped-column value alone: E_ms=%.4f", sum_sq_trunc / nerr);
    checks++;
    if (!(sum_sq_fix < sum_sq_trunc)) begin
      failures++;
      $display("FAIL compensation does not reduce the mean square error");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
