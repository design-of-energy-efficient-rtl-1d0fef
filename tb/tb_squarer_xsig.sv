// tb_squarer_xsig: exhaustive check of the fixed-width 16-bit squarer with
// extra operand-bit signatures (squarer_approx with XSIG set, which uses
// sq_xsig_ecu), for every size XSIG = 1..7 side by side.
//
// For each size the testbench first builds its own compensation table from
// the arithmetic model: for every group it tries theta = 0..7 over all
// operands of the group and keeps the one with the smallest largest error.
// It then applies all 65536 operands. Each output must equal the model output
// with that table, and ecu_group must equal theta + 1 with ecu_case = 0.
//
// It also measures E_max, the largest |error| against the exact square in
// output LSBs. For each size, E_max must stay within 0.025 of the figure the
// design aims for with that many extra bits (0.94, 0.92, 0.85, 0.84, 0.82,
// 0.80, 0.79). It must also never grow when a bit is added, and seven bits
// must beat one.
module tb_squarer_xsig;
  import aaac_ref_pkg::*;

  localparam int NMAX = 7;
  localparam real TARGET [1:NMAX] = '{0.94, 0.92, 0.85, 0.84, 0.82, 0.80, 0.79};

  logic [15:0] a;
  logic [15:0] p    [1:NMAX];
  logic [3:0]  cas  [1:NMAX];
  logic [2:0]  grp  [1:NMAX];
  int checks = 0, failures = 0;
  int_da_t tbl [1:NMAX];
  real mx [1:NMAX];
  real sa7 = 0, ss7 = 0;

  for (genvar x = 1; x <= NMAX; x++) begin : g_dut
    squarer_approx #(.XSIG(x)) dut (.a, .p(p[x]), .ecu_case(cas[x]), .ecu_group(grp[x]));
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 1; x <= NMAX; x++) begin
      tbl[x] = sq_xsig_table(x);
      mx[x]  = 0;
    end
    for (int v = 0; v < 65536; v++) begin
      real exact;
      a = 16'(v);
      #1;
      exact = real'(longint'(v) * longint'(v)) / 65536.0;
      for (int x = 1; x <= NMAX; x++) begin
        int          t;
        logic [15:0] e;
        real         d;
        t = tbl[x][sq_xsig_index(a, x)];
        e = sq_xsig_fixed_ref(a, t);
        d = real'(p[x]) - exact;
        checks++;
        if (p[x] !== e || int'(grp[x]) != t + 1 || cas[x] != 4'd0) begin
          failures++;
          if (failures < 10)
            $display("FAIL xsig=%0d a=%h p=%h/%h group=%0d/%0d case=%0d",
                     x, a, p[x], e, grp[x], t + 1, cas[x]);
        end
        if (d < 0) d = -d;
        if (d > mx[x]) mx[x] = d;
        if (x == NMAX) begin
          sa7 += d;
          ss7 += d * d;
        end
      end
    end
    for (int x = 1; x <= NMAX; x++) begin
      $display("%0d extra bits: E_max=%.4f (aim %.2f)", x, mx[x], TARGET[x]);
      checks++;
      if (mx[x] > TARGET[x] + 0.025 || mx[x] < TARGET[x] - 0.05) begin
        failures++;
        $display("FAIL E_max with %0d extra bits out of range", x);
      end
      if (x > 1) begin
        checks++;
        if (mx[x] > mx[x-1]) begin
          failures++;
          $display("FAIL E_max grows from %0d to %0d extra bits", x - 1, x);
        end
      end
    end
    $display("7 extra bits: E_ave=%.4f E_ms=%.4f", sa7 / 65536.0, ss7 / 65536.0);
    checks++;
    if (!(mx[NMAX] < mx[1])) begin
      failures++;
      $display("FAIL seven extra bits do not lower E_max");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
