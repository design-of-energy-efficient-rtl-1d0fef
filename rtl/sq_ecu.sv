// sq_ecu: error compensation unit of the approximate squarer (signature
// generator plus compensation selection).
//
// Signatures: CA is the number of ones among the H partial-product bits of
// column N-2, the heaviest dropped column; it is produced as a thermometer
// code by a bit-sorting network (sorting_network). CB is the operand bit
// a[6], fed in directly. (CA, CB) select one of ten input cases:
//   case 1: CA = 0              case 6 : CA = 3
//   case 2: CA = 1, CB = 0      case 7 : CA = 4
//   case 3: CA = 1, CB = 1      case 8 : CA = 5
//   case 4: CA = 2, CB = 0      case 9 : CA = 6
//   case 5: CA = 2, CB = 1      case 10: CA = 7
// For the fixed-width squarer cases with equal integer compensation are
// merged into seven groups (1,2 | 3,4 | 5,6 | 7 | 8 | 9 | 10) and theta, the
// estimated carry into column N-1, is group - 1. For the full-width squarer
// every case keeps its own estimate of the dropped columns' value (stpl,
// output LSBs with 16 fraction bits).
// The table is the one derived for 16-bit operands (H = 7).
// Purely combinational, no clock.
module sq_ecu
  import aaac_pkg::*;
#(
  parameter int unsigned H = 7           // bits in column N-2
) (
  input  logic [H-1:0]        col,       // partial-product bits of column N-2
  input  logic                cb,        // second signature (operand bit 6)
  output logic [3:0]          case_no,   // 1..10
  output logic [2:0]          group,     // 1..7
  output logic [2:0]          theta,
  output logic [STPL_W-1:0]   stpl
);
  if (H != 7) begin : g_bad_size
    $error("sq_ecu: the compensation table is defined for a 7-bit column");
  end

  logic [H-1:0] therm;     // therm[k] = (CA > k)
  logic [H:0]   ca_is;     // one-hot: ca_is[k] = (CA == k)

  sorting_network #(.N(H)) u_sort (
    .in  (col),
    .out (therm)
  );

  always_comb begin
    ca_is[0] = ~therm[0];
    for (int k = 1; k < H; k++) ca_is[k] = therm[k-1] & ~therm[k];
    ca_is[H] = therm[H-1];
  end

  always_comb begin
    case_no = 4'd1;
    if (ca_is[1])      case_no = cb ? 4'd3 : 4'd2;
    else if (ca_is[2]) case_no = cb ? 4'd5 : 4'd4;
    else begin
      for (int k = 3; k <= H; k++)
        if (ca_is[k]) case_no = 4'(k + 3);
    end
  end

  always_comb begin
    unique case (case_no)
      4'd1, 4'd2: group = 3'd1;
      4'd3, 4'd4: group = 3'd2;
      4'd5, 4'd6: group = 3'd3;
      4'd7:       group = 3'd4;
      4'd8:       group = 3'd5;
      4'd9:       group = 3'd6;
      default:    group = 3'd7;
    endcase
    theta = SQ_THETA[case_no - 4'd1];
    stpl  = SQ_STPL[case_no - 4'd1];
  end

  always_comb begin
    assert ($onehot(ca_is)) else $error("sq_ecu: sorted column is not a thermometer code");
    assert (theta == group - 3'd1) else $error("sq_ecu: theta does not match group");
  end
endmodule
