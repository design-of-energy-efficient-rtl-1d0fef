// squarer_approx: approximate N-bit unsigned squarer with an error
// compensation unit (ECU).
//
// Squaring array. A^2 = sum_k a_k 4^k + sum_{i<j} a_i a_j 2^(i+j+1), so every
// bit is an AND of two operand bits (no Booth encoding). The array is folded
// once more with a_(k) + a_(k-1) a_(k) = 2 a_(k-1) a_(k) + a_(k) ~a_(k-1):
//   column 2k   : a_k & ~a_(k-1) (a_0 alone in column 0) and the products
//                 a_i a_j with i + j + 1 = 2k, j >= i + 2
//   column 2k+1 : a_(k-1) a_k and the products a_i a_j with i + j = 2k
// This leaves seven bits in column N-2 for N = 16 and at most N/2 bits in
// any column.
//
// As in the multiplier, only columns N-1 (TP_H) and N..2N-1 (AP) are summed.
// Columns 0..N-2 (TP_L) are not added; instead the bits of column N-2 are
// formed only to feed the ECU (sq_ecu), which counts them (signature CA),
// looks at a[6] (signature CB) and returns a compensation constant.
//   FULL_WIDTH = 0 (fixed width, the main form): p is the upper N bits,
//     p = floor((AP + TP_H + (theta + 1) * 2^(N-1)) / 2^N); the "+1" rounds.
//   FULL_WIDTH = 1: p is 2N bits, AP + TP_H plus the case's estimate of the
//     TP_L value, whose low N-1 bits become the low bits of p.
// The kept bits are arranged into rows column by column (the r-th bit of
// each column goes to row r), reduced to two rows by compression_tree and
// added by final_adder.
//
// XSIG = 1..7 (fixed width only) swaps sq_ecu for sq_xsig_ecu, which refines
// the grouping with XSIG extra operand bits and reads theta from a table chosen
// to minimise the largest error. In that form ecu_case is 0 (the ten-case
// classification is not made) and ecu_group reports theta + 1.
//
// The ECU tables are the ones derived for N = 16; the module refuses other
// sizes. Interface: a unsigned, p unsigned. Timing: purely combinational.
module squarer_approx
  import aaac_pkg::*;
#(
  parameter int unsigned N          = 16,
  parameter bit          FULL_WIDTH = 1'b0,
  parameter int unsigned XSIG       = 0,      // extra signature bits, 0 = basic ECU
  localparam int unsigned PW        = FULL_WIDTH ? 2 * N : N
) (
  input  logic [N-1:0]  a,
  output logic [PW-1:0] p,
  output logic [3:0]    ecu_case,    // 1..10
  output logic [2:0]    ecu_group    // 1..7 (fixed-width grouping)
);
  if (N != ECU_N) begin : g_bad_size
    $error("squarer_approx: the ECU is defined for N = %0d only", ECU_N);
  end
  if (XSIG > SQ_XSIG_MAX || (XSIG != 0 && FULL_WIDTH)) begin : g_bad_xsig
    $error("squarer_approx: XSIG must be 0..%0d and needs FULL_WIDTH = 0", SQ_XSIG_MAX);
  end

  // Term r of column col of the folded squaring array, encoded as
  // kind * 4096 + i * 64 + j, or -1 when the column has fewer than r+1 bits.
  //   kind 0: a_i alone   kind 1: a_i & ~a_j   kind 2: a_i & a_j
  function automatic int term(int col, int r);
    int idx = 0;
    if (col == 0) begin
      if (r == idx) return 0 * 4096;
      idx++;
    end else if (col % 2 == 0) begin
      if (col / 2 < N) begin
        if (r == idx) return 1 * 4096 + (col / 2) * 64 + (col / 2 - 1);
        idx++;
      end
    end else if (col >= 3 && (col - 3) / 2 + 1 < N) begin
      if (r == idx) return 2 * 4096 + ((col - 3) / 2) * 64 + ((col - 3) / 2 + 1);
      idx++;
    end
    for (int i = 0; i < N; i++) begin
      int j = col - 1 - i;
      if (j >= i + 2 && j < N) begin
        if (r == idx) return 2 * 4096 + i * 64 + j;
        idx++;
      end
    end
    return -1;
  endfunction

  function automatic int height(int col);
    int h = 0;
    while (term(col, h) >= 0) h++;
    return h;
  endfunction

  function automatic int max_height();
    int m = 0;
    for (int col = N - 1; col < 2 * N; col++)
      if (height(col) > m) m = height(col);
    return m;
  endfunction

  localparam int unsigned W     = N + 1;          // columns N-1 .. 2N-1
  localparam int unsigned DROWS = max_height();   // data rows
  localparam int unsigned ROWS  = DROWS + 1;      // + ECU row
  localparam int unsigned H     = height(N - 2);  // ECU column

  // one partial-product bit from its encoding
  function automatic logic pp_bit(logic [N-1:0] x, int code);
    int kind = code / 4096;
    int i    = (code / 64) % 64;
    int j    = code % 64;
    case (kind)
      0:       return x[i];
      1:       return x[i] & ~x[j];
      default: return x[i] & x[j];
    endcase
  endfunction

  logic [W-1:0] rows [ROWS];

  for (genvar r = 0; r < DROWS; r++) begin : g_row
    for (genvar k = 0; k < W; k++) begin : g_bit
      localparam int CODE = term(k + N - 1, r);
      if (CODE >= 0) begin : g_and
        assign rows[r][k] = pp_bit(a, CODE);
      end else begin : g_empty
        assign rows[r][k] = 1'b0;
      end
    end
  end

  // ---------------------------------------------------------------------
  // Error compensation unit: column N-2 is formed only for the signatures
  // ---------------------------------------------------------------------
  logic [H-1:0]        ecu_col;
  logic [2:0]          theta;
  logic [STPL_W-1:0]   stpl;

  for (genvar r = 0; r < H; r++) begin : g_ecu_col
    localparam int CODE = term(N - 2, r);
    assign ecu_col[r] = pp_bit(a, CODE);
  end

  if (XSIG == 0) begin : g_ecu_basic
    sq_ecu #(.H(H)) u_ecu (
      .col     (ecu_col),
      .cb      (a[SQ_CB_BIT]),
      .case_no (ecu_case),
      .group   (ecu_group),
      .theta   (theta),
      .stpl    (stpl)
    );
  end else begin : g_ecu_xsig
    localparam int unsigned NX = (XSIG == 0) ? 1 : XSIG;
    logic [NX-1:0] xbits;

    // xbits[NX-1] is the first extra bit (a6)
    for (genvar s = 0; s < NX; s++) begin : g_xbit
      assign xbits[NX-1-s] = a[SQ_XSIG_BITS[s]];
    end

    sq_xsig_ecu #(.H(H), .NX(NX)) u_ecu (
      .col   (ecu_col),
      .xbits (xbits),
      .theta (theta)
    );

    assign ecu_case  = 4'd0;
    assign ecu_group = theta + 3'd1;
    assign stpl      = '0;
  end

  if (FULL_WIDTH) begin : g_ecu_full
    assign rows[DROWS] = W'(stpl[STPL_W-1:N-1]);
  end else begin : g_ecu_fixed
    // compensation plus the rounding 1, both at column N-1
    assign rows[DROWS] = W'({1'b0, theta} + 4'd1);
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
