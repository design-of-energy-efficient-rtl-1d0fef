// aaac_top: the approximate multiplier and squarer, each in its fixed-width
// and full-width form, side by side.
//
// Five independent combinational units with their own ports:
//   mul_fixed : N x N signed Booth multiplier, N-bit rounded upper half
//   mul_full  : the same operands, 2N-bit approximate product
//   sq_fixed  : N-bit unsigned squarer, N-bit rounded upper half
//   sq_full   : the same operand, 2N-bit approximate square
//   sq_xsig   : the same operand, N-bit rounded upper half from the squarer
//               whose ECU adds seven operand bits as extra signatures
// The two multipliers share their operand ports, as do the three squarers;
// each unit carries its own error compensation unit, and the case and group
// it picked are brought out for observation. All five follow the same
// scheme: only the columns at and above the output's binary point minus one
// are summed, and a small classifier supplies the missing low-column
// contribution as a constant.
// Timing: purely combinational, no clock, no reset.
module aaac_top
  import aaac_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   mul_a,
  input  logic [N-1:0]   mul_b,
  output logic [N-1:0]   mul_p_fixed,
  output logic [2*N-1:0] mul_p_full,
  output logic [2:0]     mul_case,        // ECU case of the multiplier pair
  output mult_group_e    mul_group,       // ECU group of the multiplier pair

  input  logic [N-1:0]   sq_a,
  output logic [N-1:0]   sq_p_fixed,
  output logic [2*N-1:0] sq_p_full,
  output logic [3:0]     sq_case,         // ECU case of the squarer operand
  output logic [2:0]     sq_group,        // ECU group of the squarer operand
  output logic [N-1:0]   sq_p_xsig,       // squarer with extra signatures
  output logic [2:0]     sq_xsig_group    // its compensation theta + 1
);
  logic [2:0]  mul_case_full;
  mult_group_e mul_group_full;
  logic [3:0]  sq_case_full;
  logic [2:0]  sq_group_full;
  logic [3:0]  sq_xsig_case;    // always 0 in the extra-signature form

  booth_mult_approx #(.N(N), .FULL_WIDTH(1'b0)) u_mul_fixed (
    .a         (mul_a),
    .b         (mul_b),
    .p         (mul_p_fixed),
    .ecu_case  (mul_case),
    .ecu_group (mul_group)
  );

  booth_mult_approx #(.N(N), .FULL_WIDTH(1'b1)) u_mul_full (
    .a         (mul_a),
    .b         (mul_b),
    .p         (mul_p_full),
    .ecu_case  (mul_case_full),
    .ecu_group (mul_group_full)
  );

  squarer_approx #(.N(N), .FULL_WIDTH(1'b0)) u_sq_fixed (
    .a         (sq_a),
    .p         (sq_p_fixed),
    .ecu_case  (sq_case),
    .ecu_group (sq_group)
  );

  squarer_approx #(.N(N), .FULL_WIDTH(1'b1)) u_sq_full (
    .a         (sq_a),
    .p         (sq_p_full),
    .ecu_case  (sq_case_full),
    .ecu_group (sq_group_full)
  );

  squarer_approx #(.N(N), .FULL_WIDTH(1'b0), .XSIG(SQ_XSIG_MAX)) u_sq_xsig (
    .a         (sq_a),
    .p         (sq_p_xsig),
    .ecu_case  (sq_xsig_case),
    .ecu_group (sq_xsig_group)
  );

  // both forms see the same operands, so they must classify them alike
  always_comb begin
    assert (mul_case_full == mul_case && mul_group_full == mul_group)
      else $error("aaac_top: multiplier ECUs disagree");
    assert (sq_case_full == sq_case && sq_group_full == sq_group)
      else $error("aaac_top: squarer ECUs disagree");
    assert (sq_xsig_case == 4'd0)
      else $error("aaac_top: extra-signature squarer reports a basic ECU case");
  end
endmodule
