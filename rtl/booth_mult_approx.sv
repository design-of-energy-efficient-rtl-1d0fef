// booth_mult_approx: approximate radix-4 Booth multiplier, N x N bits signed,
// with an error compensation unit (ECU).
//
// Main idea. A full Booth array has N/2 partial-product rows spread over 2N
// columns. The multiplier keeps only the columns that matter for the result:
// column N-1 (the first column right of the output's binary point, "TP_H")
// and columns N..2N-1 (the kept part, "AP"). The columns 0..N-2 ("TP_L") are
// never formed. What they would have contributed is estimated by the ECU from
// three cheap signatures of the operands: CA, the number of zero partial
// products; CB, the number of negative Booth digits; FA, whether at least N/2
// bits of A are set. The signatures pick one of three groups, each with a
// fixed compensation constant.
//
// Two forms, chosen by FULL_WIDTH:
//   FULL_WIDTH = 0 (fixed width, the main form): p is N bits, the upper half
//     of the product, p = floor((AP + TP_H + (theta + 1) * 2^(N-1)) / 2^N),
//     where theta in {2,1,0} estimates the carry out of TP_L and the "+1"
//     rounds to nearest.
//   FULL_WIDTH = 1: p is 2N bits, AP + TP_H plus the group's estimate of the
//     TP_L value (a constant with N-1 fraction bits below column N-1, which
//     also forms the low N-1 bits of p). No rounding constant.
//
// Structure: N/2 Booth encoders (booth_encoder) drive one selector cell
// (booth_selector) per kept partial-product bit. Each row is a one's
// complement for a negative digit; the +1 corrections c_i all fall in TP_L
// (column 2i <= N-2) and so are among the dropped bits. Sign extension uses
// the usual constant method: the top bit of each row is inverted and one
// constant, -2^N * (1 + 4 + ... + 4^(N/2-1)), is added as an extra row. The
// rows plus the constant row plus the ECU row are reduced to two by
// compression_tree (4:2 and 3:2 compressors) and added by final_adder.
//
// The ECU case boundaries and constants are the ones derived for N = 16; the
// module refuses other sizes. Interface: a, b two's complement; p two's
// complement. Timing: purely combinational, no clock, no latency.
module booth_mult_approx
  import aaac_pkg::*;
#(
  parameter int unsigned N          = 16,
  parameter bit          FULL_WIDTH = 1'b0,
  localparam int unsigned PW        = FULL_WIDTH ? 2 * N : N
) (
  input  logic [N-1:0]  a,          // multiplicand
  input  logic [N-1:0]  b,          // multiplier (Booth encoded)
  output logic [PW-1:0] p,
  output logic [2:0]    ecu_case,   // 1..5, input case picked by the ECU
  output mult_group_e   ecu_group   // compensation group
);
  if (N != ECU_N) begin : g_bad_size
    $error("booth_mult_approx: the ECU is defined for N = %0d only", ECU_N);
  end

  localparam int unsigned NPP  = N / 2;           // partial products
  localparam int unsigned W    = N + 1;           // kept columns N-1 .. 2N-1
  localparam int unsigned ROWS = NPP + 2;         // + constant row + ECU row

  // Sign-extension constant, modulo 2^(2N).
  function automatic logic [2*N-1:0] sign_const();
    logic [2*N-1:0] acc = '0;
    for (int unsigned i = 0; i < NPP; i++) acc = acc + ((2*N)'(1) << (N + 2 * i));
    return -acc;
  endfunction

  localparam logic [2*N-1:0] KCONST = sign_const();

  // ---------------------------------------------------------------------
  // Booth encoders
  // ---------------------------------------------------------------------
  logic [N:0]     bx;                 // {b, 0}: bx[k+1] = b[k], bx[0] = b[-1]
  logic [NPP-1:0] s, d, n, z, c;
  logic [N+1:0]   ae;                 // ae[j+1] = a[j]; a[-1] = 0, a[N] = a[N-1]

  assign bx = {b, 1'b0};
  assign ae = {a[N-1], a, 1'b0};

  for (genvar i = 0; i < NPP; i++) begin : g_enc
    booth_encoder u_enc (
      .b_hi  (bx[2*i+2]),
      .b_mid (bx[2*i+1]),
      .b_lo  (bx[2*i]),
      .s     (s[i]),
      .d     (d[i]),
      .n     (n[i]),
      .z     (z[i]),
      .c     (c[i])
    );
  end

  // ---------------------------------------------------------------------
  // Kept part of the partial-product array (local column k = column k+N-1)
  // ---------------------------------------------------------------------
  logic [W-1:0] rows [ROWS];

  for (genvar i = 0; i < NPP; i++) begin : g_row
    for (genvar k = 0; k < W; k++) begin : g_bit
      localparam int J = k + N - 1 - 2 * i;   // bit index inside row i
      if (J >= 0 && J <= N) begin : g_sel
        logic pp;
        booth_selector u_sel (
          .a_j   (ae[J+1]),
          .a_jm1 (ae[J]),
          .s     (s[i]),
          .d     (d[i]),
          .neg   (c[i]),
          .pp    (pp)
        );
        // the row's sign bit enters inverted (constant sign extension)
        assign rows[i][k] = (J == N) ? ~pp : pp;
      end else begin : g_empty
        assign rows[i][k] = 1'b0;
      end
    end
  end

  // constant row: sign-extension constant, plus the rounding 1 at column N-1
  // in the fixed-width form
  assign rows[NPP] = {KCONST[2*N-1:N], (FULL_WIDTH ? 1'b0 : 1'b1)};

  // ---------------------------------------------------------------------
  // Error compensation unit
  // ---------------------------------------------------------------------
  logic [3:0]            ca, cb;
  logic                  fa;
  logic [1:0]            theta;
  logic [STPL_W-1:0]     stpl;

  mult_signature_gen #(.N(N)) u_sig (
    .z  (z),
    .n  (n),
    .a  (a),
    .ca (ca),
    .cb (cb),
    .fa (fa)
  );

  mult_ecu u_ecu (
    .ca      (ca),
    .cb      (cb),
    .fa      (fa),
    .case_no (ecu_case),
    .group   (ecu_group),
    .theta   (theta),
    .stpl    (stpl)
  );

  if (FULL_WIDTH) begin : g_ecu_full
    // the part of the estimate at and above column N-1
    assign rows[NPP+1] = W'(stpl[STPL_W-1:N-1]);
  end else begin : g_ecu_fixed
    assign rows[NPP+1] = W'(theta);
  end

  // ---------------------------------------------------------------------
  // Compression and final addition
  // ---------------------------------------------------------------------
  logic [W-1:0] sum_row, carry_row, y;

  compression_tree #(.ROWS(ROWS), .W(W)) u_tree (
    .rows      (rows),
    .sum_row   (sum_row),
    .carry_row (carry_row)
  );

  final_adder #(.W(W)) u_add (
    .x0 (sum_row),
    .x1 (carry_row),
    .y  (y)
  );

  if (FULL_WIDTH) begin : g_out_full
    assign p = {y, stpl[N-2:0]};
  end else begin : g_out_fixed
    assign p = y[W-1:1];
  end
endmodule
