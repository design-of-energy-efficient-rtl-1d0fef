// tb_squarer_approx: exhaustive check of the 16-bit approximate squarer in
// both forms (fixed width, the default, and full width) over all 65536
// operands against the arithmetic reference model, including the ECU case
// and group. It then measures the error against the exact square in units of
// the fixed-width output LSB (2^16) and compares the three metrics, rounded
// to two decimals, with the values this design is expected to reach:
//   fixed width: E_ave 0.27, E_max 0.94, E_ms 0.11
//   full width : E_ave 0.13, E_max 0.68, E_ms 0.03
// (E_max and E_ave use |error|, E_ms the squared error.)
module tb_squarer_approx;
  import aaac_ref_pkg::*;

  logic [15:0] a;
  logic [15:0] p_fix;
  logic [31:0] p_full;
  logic [3:0]  case_fix, case_full;
  logic [2:0]  grp_fix, grp_full;
  int checks = 0, failures = 0;
  int case_hits [1:10];
  real sa1 = 0, ss1 = 0, mx1 = 0, sa2 = 0, ss2 = 0, mx2 = 0;

  squarer_approx dut_fix (.a, .p(p_fix), .ecu_case(case_fix), .ecu_group(grp_fix));
  squarer_approx #(.FULL_WIDTH(1'b1)) dut_full (
    .a, .p(p_full), .ecu_case(case_full), .ecu_group(grp_full));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(real x, real target);
    real d = x - target;
    return (d < 0.0051) && (d > -0.0051);
  endfunction

  task automatic metric(string what, real got, real want);
    checks++;
    if (!near(got, want)) begin
      failures++;
      $display("FAIL %s = %.4f, expected %.2f", what, got, want);
    end
  endtask

  initial begin
    foreach (case_hits[k]) case_hits[k] = 0;
    for (int v = 0; v < 65536; v++) begin
      sq_info_t s;
      logic [15:0] ef;
      logic [31:0] eu;
      real exact, e1, e2;
      a = 16'(v);
      #1;
      s  = sq_info(a);
      ef = sq_fixed_ref(a);
      eu = sq_full_ref(a);
      case_hits[s.case_no]++;
      checks++;
      if (p_fix !== ef || p_full !== eu || int'(case_fix) != s.case_no ||
          int'(grp_fix) != s.group || case_full != case_fix || grp_full != grp_fix) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%h fixed=%h/%h full=%h/%h case=%0d/%0d group=%0d/%0d",
                   a, p_fix, ef, p_full, eu, case_fix, s.case_no, grp_fix, s.group);
      end
      exact = real'(longint'(v) * longint'(v)) / 65536.0;
      e1 = real'(p_fix) - exact;
      e2 = real'(p_full) / 65536.0 - exact;
      if (e1 < 0) e1 = -e1;
      if (e2 < 0) e2 = -e2;
      sa1 += e1; ss1 += e1 * e1; if (e1 > mx1) mx1 = e1;
      sa2 += e2; ss2 += e2 * e2; if (e2 > mx2) mx2 = e2;
    end
    for (int k = 1; k <= 10; k++) begin
      checks++;
      if (case_hits[k] == 0) begin
        failures++;
        $display("FAIL ECU case %0d never exercised", k);
      end
    end
    $display("fixed width : E_ave=%.4f E_max=%.4f E_ms=%.4f", sa1 / 65536.0, mx1, ss1 / 65536.0);
    $display("full width  : E_ave=%.4f E_max=%.4f E_ms=%.4f", sa2 / 65536.0, mx2, ss2 / 65536.0);
    metric("fixed E_ave", sa1 / 65536.0, 0.27);
    metric("fixed E_max", mx1, 0.94);
    metric("fixed E_ms",  ss1 / 65536.0, 0.11);
    metric("full E_ave",  sa2 / 65536.0, 0.13);
    metric("full E_max",  mx2, 0.68);
    metric("full E_ms",   ss2 / 65536.0, 0.03);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
