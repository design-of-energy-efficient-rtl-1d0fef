// tb_sq_ecu: exhaustive check of the squarer's signature generator and
// compensation selection over all 128 column patterns and both values of the
// second signature, against the ten-case table.
module tb_sq_ecu;
  import aaac_pkg::*;
  logic [6:0]        col;
  logic              cb;
  logic [3:0]        case_no;
  logic [2:0]        group, theta;
  logic [STPL_W-1:0] stpl;
  int checks = 0, failures = 0;

  localparam int THETA [10] = '{0, 0, 1, 1, 2, 2, 3, 4, 5, 6};
  localparam int STPL  [10] = '{14398, 29747, 40698, 53300, 66414, 84555,
                                111188, 139448, 169332, 200835};
  localparam int GROUP [10] = '{1, 1, 2, 2, 3, 3, 4, 5, 6, 7};

  sq_ecu dut (.col, .cb, .case_no, .group, .theta, .stpl);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int ca, ec;
      {cb, col} = 8'(v);
      #1;
      ca = $countones(col);
      ec = (ca == 0) ? 1 : (ca == 1) ? 2 + int'(cb) : (ca == 2) ? 4 + int'(cb) : ca + 3;
      checks++;
      if (int'(case_no) != ec || int'(group) != GROUP[ec-1] ||
          int'(theta) != THETA[ec-1] || int'(stpl) != STPL[ec-1]) begin
        failures++;
        $display("FAIL col=%b cb=%b: case %0d group %0d theta %0d stpl %0d, expected case %0d",
                 col, cb, case_no, group, theta, stpl, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
