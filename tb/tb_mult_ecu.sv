// tb_mult_ecu: exhaustive check of the multiplier's compensation selection
// over every legal signature triple (CA 0..8, CB 0..8, FA 0..1). The expected
// case, group and constants are worked out from the case table.
module tb_mult_ecu;
  import aaac_pkg::*;
  logic [3:0]        ca, cb;
  logic              fa;
  logic [2:0]        case_no;
  mult_group_e       group;
  logic [1:0]        theta;
  logic [STPL_W-1:0] stpl;
  int checks = 0, failures = 0;
  int hits [1:5];

  mult_ecu dut (.ca, .cb, .fa, .case_no, .group, .theta, .stpl);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hits[k]) hits[k] = 0;
    for (int a_ = 0; a_ <= 8; a_++)
      for (int b_ = 0; b_ <= 8; b_++)
        for (int f = 0; f <= 1; f++) begin
          int ec, eg, et;
          int es;
          ca = 4'(a_); cb = 4'(b_); fa = f[0];
          #1;
          if (a_ >= 6) ec = 5;
          else if (a_ >= 2) ec = ((a_ == 2) && ((b_ > 3 && f == 0) || (b_ < 3 && f == 1))) ? 3 : 4;
          else ec = ((a_ == 1) && (b_ < 3) && (f == 0)) ? 1 : 2;
          eg = (ec == 2 || ec == 3) ? 1 : (ec == 5) ? 3 : 2;
          et = (eg == 1) ? 2 : (eg == 2) ? 1 : 0;
          es = (eg == 1) ? 73092 : (eg == 2) ? 56413 : 26221;
          hits[ec]++;
          checks++;
          if (int'(case_no) != ec || int'(group) != eg || int'(theta) != et || int'(stpl) != es) begin
            failures++;
            $display("FAIL ca=%0d cb=%0d fa=%0d: case %0d group %0d theta %0d stpl %0d, expected %0d %0d %0d %0d",
                     a_, b_, f, case_no, group, theta, stpl, ec, eg, et, es);
          end
        end
    for (int k = 1; k <= 5; k++) begin
      checks++;
      if (hits[k] == 0) begin
        failures++;
        $display("FAIL case %0d never selected", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
