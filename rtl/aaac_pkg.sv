// aaac_pkg: types and constants shared by the approximate Booth multiplier and
// the approximate squarer.
//
// Both units split the partial-product array at the binary point of the output.
// Columns n-1 and up are summed exactly; the carry that the dropped columns
// 0..n-2 would have produced is replaced by a per-group constant chosen by an
// error compensation unit (ECU).  The constants below are the group averages
// the design is built around, for n = 16:
//   * THETA_*   : integer compensation added at column n-1 of a fixed-width
//                 unit (the estimated carry out of the dropped columns).
//   * STPL_*    : estimated value of the dropped columns for a full-width unit,
//                 stored with 16 fraction bits, i.e. in units of 2^-16 of the
//                 fixed-width output LSB, which is one product LSB when n = 16.
//                 Each is round(S * 65536) of the tabulated average S.
package aaac_pkg;

  // Operand width for which the ECU tables below were derived.
  localparam int unsigned ECU_N = 16;
  // Fraction bits of the full-width compensation constants.
  localparam int unsigned STPL_FRAC = 16;
  localparam int unsigned STPL_W    = 18;

  // ---------------------------------------------------------------------
  // Booth multiplier ECU: five input cases merged into three groups.
  // ---------------------------------------------------------------------
  typedef enum logic [1:0] {
    MG1 = 2'd1,   // cases 2 and 3
    MG2 = 2'd2,   // cases 1 and 4
    MG3 = 2'd3    // case 5
  } mult_group_e;

  localparam logic [1:0] MULT_THETA_G1 = 2'd2;
  localparam logic [1:0] MULT_THETA_G2 = 2'd1;
  localparam logic [1:0] MULT_THETA_G3 = 2'd0;

  localparam logic [STPL_W-1:0] MULT_STPL_G1 = 18'd73092;  // 1.1153
  localparam logic [STPL_W-1:0] MULT_STPL_G2 = 18'd56413;  // 0.8608
  localparam logic [STPL_W-1:0] MULT_STPL_G3 = 18'd26221;  // 0.4001

  // ---------------------------------------------------------------------
  // Squarer ECU: ten input cases; the fixed-width form merges them into
  // seven groups that share a theta value.
  // ---------------------------------------------------------------------
  localparam int unsigned SQ_CASES = 10;

  // theta per case (index 0 = case 1)
  localparam logic [2:0] SQ_THETA [SQ_CASES] = '{
    3'd0, 3'd0, 3'd1, 3'd1, 3'd2, 3'd2, 3'd3, 3'd4, 3'd5, 3'd6
  };

  // average value of the dropped columns per case, 16 fraction bits
  localparam logic [STPL_W-1:0] SQ_STPL [SQ_CASES] = '{
    18'd14398,   // 0.2197
    18'd29747,   // 0.4539
    18'd40698,   // 0.6210
    18'd53300,   // 0.8133
    18'd66414,   // 1.0134
    18'd84555,   // 1.2902
    18'd111188,  // 1.6966
    18'd139448,  // 2.1278
    18'd169332,  // 2.5838
    18'd200835   // 3.0645
  };

  // Input bit of the squarer used as second signature CB.
  localparam int unsigned SQ_CB_BIT = 6;

  // Extra operand-bit signatures of the refined fixed-width squarer ECU
  // (sq_xsig_ecu), in the order they are added: a6, a7, a13, a0, a4, a5, a8.
  localparam int unsigned SQ_XSIG_MAX = 7;
  localparam int unsigned SQ_XSIG_BITS [SQ_XSIG_MAX] = '{6, 7, 13, 0, 4, 5, 8};

  // Compensation tables of sq_xsig_ecu, one per number NX of extra bits.
  // Group g = {CA, first NX extra bits} (a6 just below CA) holds its theta in
  // bits [3g+2:3g]. Each theta is the value in 0..7 that minimises the
  // largest |approximate - exact| fixed-width error over all 16-bit operands
  // of the group, the smaller value on a tie; groups no operand reaches hold
  // 0. The tables follow from a single sweep over the 65536 operands.
  localparam logic [47:0] SQ_XSIG_THETA_NX1 =
    48'h1ad91b491240;
  localparam logic [95:0] SQ_XSIG_THETA_NX2 =
    96'h030d6db246db692449249000;
  localparam logic [191:0] SQ_XSIG_THETA_NX3 =
    192'h000c00c28b6896592471b6db4d249248a249249041000000;
  localparam logic [383:0] SQ_XSIG_THETA_NX4 = {
    192'h000000c00000c00a00b2da0092d8ec8e49236e46db6db6db,
    192'h49b492492492492251249249249249008009000000000000
  };
  localparam logic [767:0] SQ_XSIG_THETA_NX5 = {
    192'h000000000000c00000000000c00000a00000b20a28a00000,
    192'h920a28918a208db9249208186db9246db6db6db6db6db6da,
    192'h49a6da492692492492492492452492249489249249249249,
    192'h249249249249008240000241000000000000000000000000
  };
  localparam logic [1535:0] SQ_XSIG_THETA_NX6 = {
    192'h000000000000000000000000c00000000000000000000000,
    192'hc00000000000a00000000000b60800a00a00a00000000000,
    192'h920800a00a00920600a0080091c6d8920920920800800600,
    192'h6db6d89209206db6d87186d86db69a6db6db6db6d86d8690,
    192'h6926926db6924924924d3492492492492492492492492491,
    192'h451491492491249249492249249249249249249249249249,
    192'h249249249249249249249249000248248208000000249001,
    192'h000000200000000000000000000000000000000000000000
  };
  localparam logic [3071:0] SQ_XSIG_THETA_NX7 = {
    192'h000000000000000000000000000000000000000000000000,
    192'hc00000000000000000000000000000000000000000000000,
    192'hc00000000000000000000000a00000000000000000000000,
    192'hb6c800800000a00000a00000a00000000000000000000000,
    192'h96c800800000a00000a00000924800600000a00000800000,
    192'h92372371b6009248008e2800924800800000800000600000,
    192'h6db71b6da6009248009238006db6db6936007236006da600,
    192'h6da6da6da6d26db6db6db6d96db6db69b6006e36006d2400,
    192'h6d24d26924916db6db6da4ca49249249a48a4da4da492491,
    192'h49249249249249249249249249249249249249a49a492489,
    192'h491489491489492492491491249249451249491492449249,
    192'h049049249249449249249249249249249249251251249249,
    192'h049049249249249249249249048049249249249249248249,
    192'h000000048040048048048040008000208000248049008008,
    192'h000000000000040000000000000000000000000000000000,
    192'h000000000000000000000000000000000000000000000000
  };

  // table for NX extra bits, zero-extended to the size of the largest
  function automatic logic [3*(8 << SQ_XSIG_MAX)-1:0] sq_xsig_table(int unsigned nx);
    case (nx)
      1:       return (3*(8 << SQ_XSIG_MAX))'(SQ_XSIG_THETA_NX1);
      2:       return (3*(8 << SQ_XSIG_MAX))'(SQ_XSIG_THETA_NX2);
      3:       return (3*(8 << SQ_XSIG_MAX))'(SQ_XSIG_THETA_NX3);
      4:       return (3*(8 << SQ_XSIG_MAX))'(SQ_XSIG_THETA_NX4);
      5:       return (3*(8 << SQ_XSIG_MAX))'(SQ_XSIG_THETA_NX5);
      6:       return (3*(8 << SQ_XSIG_MAX))'(SQ_XSIG_THETA_NX6);
      default: return SQ_XSIG_THETA_NX7;
    endcase
  endfunction

endpackage
