// mult_ecu: compensation selection of the approximate Booth multiplier.
//
// Classifies an input pair by its signatures CA (zero partial products), CB
// (negative digits) and FA (multiplicand at least half ones) into five cases:
//   CA in [0,1]: case 1 if CA = 1, CB < 3, FA = 0; otherwise case 2
//   CA in [2,5]: case 3 if CA = 2 and ((CB > 3, FA = 0) or (CB < 3, FA = 1));
//                otherwise case 4
//   CA in [6,8]: case 5
// Cases with the same compensation form three groups (G1 = cases 2,3;
// G2 = cases 1,4; G3 = case 5) and a 3-to-1 selection returns the group's
// constants:
//   theta - integer estimate of the carry out of the dropped columns into
//           column n-1, used by the fixed-width multiplier (2, 1, 0)
//   stpl  - estimate of the dropped columns' value in output LSBs with 16
//           fraction bits, used by the full-width multiplier
// The case boundaries and constants are those derived for 16x16 operands.
// Purely combinational, no clock.
module mult_ecu
  import aaac_pkg::*;
(
  input  logic [3:0]             ca,
  input  logic [3:0]             cb,
  input  logic                   fa,
  output logic [2:0]             case_no,   // 1..5
  output mult_group_e            group,
  output logic [1:0]             theta,
  output logic [STPL_W-1:0]      stpl
);
  always_comb begin
    if (ca <= 4'd1) begin
      case_no = (ca == 4'd1 && cb < 4'd3 && !fa) ? 3'd1 : 3'd2;
    end else if (ca <= 4'd5) begin
      case_no = (ca == 4'd2 && ((cb > 4'd3 && !fa) || (cb < 4'd3 && fa))) ? 3'd3 : 3'd4;
    end else begin
      case_no = 3'd5;
    end
  end

  always_comb begin
    unique case (case_no)
      3'd2, 3'd3: group = MG1;
      3'd1, 3'd4: group = MG2;
      default:    group = MG3;
    endcase
  end

  always_comb begin
    unique case (group)
      MG1:     begin theta = MULT_THETA_G1; stpl = MULT_STPL_G1; end
      MG2:     begin theta = MULT_THETA_G2; stpl = MULT_STPL_G2; end
      default: begin theta = MULT_THETA_G3; stpl = MULT_STPL_G3; end
    endcase
  end

  always_comb begin
    assert (ca <= 4'd8) else $error("mult_ecu: CA out of range (%0d)", ca);
  end
endmodule
