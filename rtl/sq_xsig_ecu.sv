// sq_xsig_ecu: error compensation unit of the fixed-width squarer with extra
// input-bit signatures.
//
// The basic squarer ECU (sq_ecu) splits the inputs by CA, the number of ones
// in column N-2, and by one operand bit. This unit refines the split: the
// groups are every combination of CA (0..7) with NX further operand bits,
// taken in the order a6, a7, a13, a0, a4, a5, a8 (the first NX of them). Each
// group gets its own integer carry estimate theta, looked up in a constant
// table (aaac_pkg::SQ_XSIG_THETA_NX<NX>) at index {CA, xbits}. The first xbit
// (a6) is the most significant index bit below CA. Synthesis turns the lookup
// into logic.
//
// Table contents: for each group, theta is the value in 0..7 that gives the
// smallest largest error |approximate - exact| of the fixed-width square over
// the operands of that group (ties go to the smaller theta). Indices that no
// operand reaches hold 0.
//
// Follows the source design: CA from a bit-sorting network over column N-2,
// the choice and order of the extra bits, and the min-max-error rule for
// choosing each group's compensation. Own choices: the constant-table form
// and the tie rule. All groups are implemented; none is left as a don't-care.
//
// Interface: col = the H bits of column N-2, xbits = the NX extra operand
// bits (xbits[NX-1] = a6, ...). Output theta, the carry estimate.
// Timing: purely combinational.
module sq_xsig_ecu
  import aaac_pkg::*;
#(
  parameter int unsigned H  = 7,
  parameter int unsigned NX = 7
) (
  input  logic [H-1:0]  col,
  input  logic [NX-1:0] xbits,
  output logic [2:0]    theta
);
  if (H != 7) begin : g_bad_size
    $error("sq_xsig_ecu: the compensation tables are defined for a 7-bit column");
  end
  if (NX < 1 || NX > SQ_XSIG_MAX) begin : g_bad_nx
    $error("sq_xsig_ecu: NX must be 1..%0d", SQ_XSIG_MAX);
  end

  localparam int unsigned DEPTH = 8 << NX;
  localparam logic [3*DEPTH-1:0] TABLE = (3*DEPTH)'(sq_xsig_table(NX));

  logic [H-1:0] therm;     // therm[k] = (CA > k)
  logic [2:0]   ca;        // CA, 0..H

  sorting_network #(.N(H)) u_sort (
    .in  (col),
    .out (therm)
  );

  // thermometer code to binary count
  always_comb begin
    ca = 3'd0;
    for (int k = 0; k < H; k++)
      if (therm[k]) ca = 3'(k + 1);
  end

  assign theta = TABLE[3 * {ca, xbits} +: 3];
endmodule
