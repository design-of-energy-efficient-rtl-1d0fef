// aaac_ref_pkg: arithmetic reference models for the testbenches.
//
// The models work on integers, not gates: the exact product or square is
// computed with '*', the value of the dropped low columns (TP_L) is summed
// from the partial-product array described bit by bit, and the kept part is
// exact minus dropped. The ECU classification is re-derived from the Booth
// digits and operand bits with counting functions. Only the compensation
// tables are shared knowledge and are typed in again here.
package aaac_ref_pkg;

  localparam int N = 16;

  // ------------------------------------------------------------------
  // Booth multiplier
  // ------------------------------------------------------------------
  typedef struct {
    int          ca, cb, fa;
    int          case_no, group;
    longint      tpl;        // value of columns 0..N-2 in product LSBs
  } mult_info_t;

  function automatic int booth_digit(logic [N-1:0] b, int i);
    logic bl, bm, bh;
    bh = b[2*i+1];
    bm = b[2*i];
    bl = (i == 0) ? 1'b0 : b[2*i-1];
    return -2 * int'(bh) + int'(bm) + int'(bl);
  endfunction

  function automatic mult_info_t mult_info(logic [N-1:0] a, logic [N-1:0] b);
    mult_info_t r;
    longint as_ = longint'($signed(a));
    r.ca = 0; r.cb = 0; r.tpl = 0;
    for (int i = 0; i < N/2; i++) begin
      int     dg  = booth_digit(b, i);
      longint mag = (dg < 0 ? -dg : dg) * as_;
      longint row;
      bit     negrow = (dg < 0);
      if (dg == 0) r.ca++;
      if (b[2*i+1]) r.cb++;
      row = negrow ? ~mag : mag;               // one's complement for negatives
      for (int j = 0; j <= N; j++)
        if (2*i + j <= N - 2 && row[j]) r.tpl += longint'(1) << (2*i + j);
      if (negrow && 2*i <= N - 2) r.tpl += longint'(1) << (2*i);  // +1 correction
    end
    r.fa = ($countones(a) >= N/2) ? 1 : 0;
    if (r.ca >= 6)                                            r.case_no = 5;
    else if (r.ca >= 2) begin
      if (r.ca == 2 && r.cb > 3 && r.fa == 0)                 r.case_no = 3;
      else if (r.ca == 2 && r.cb < 3 && r.fa == 1)            r.case_no = 3;
      else                                                    r.case_no = 4;
    end else if (r.ca == 1 && r.cb < 3 && r.fa == 0)          r.case_no = 1;
    else                                                      r.case_no = 2;
    r.group = (r.case_no == 2 || r.case_no == 3) ? 1 :
              (r.case_no == 1 || r.case_no == 4) ? 2 : 3;
    return r;
  endfunction

  function automatic int mult_theta(int group);
    return (group == 1) ? 2 : (group == 2) ? 1 : 0;
  endfunction

  function automatic longint mult_stpl(int group);   // 16 fraction bits
    return (group == 1) ? 73092 : (group == 2) ? 56413 : 26221;
  endfunction

  function automatic longint mult_exact(logic [N-1:0] a, logic [N-1:0] b);
    return longint'($signed(a)) * longint'($signed(b));
  endfunction

  // expected fixed-width output (N bits, two's complement)
  function automatic logic [N-1:0] mult_fixed_ref(logic [N-1:0] a, logic [N-1:0] b);
    mult_info_t m = mult_info(a, b);
    longint kept = mult_exact(a, b) - m.tpl;
    longint v    = kept + longint'(mult_theta(m.group) + 1) * (longint'(1) << (N - 1));
    return N'(v >>> N);
  endfunction

  function automatic logic [2*N-1:0] mult_full_ref(logic [N-1:0] a, logic [N-1:0] b);
    mult_info_t m = mult_info(a, b);
    return (2*N)'(mult_exact(a, b) - m.tpl + mult_stpl(m.group));
  endfunction

  // ------------------------------------------------------------------
  // Squarer (folded squaring array)
  // ------------------------------------------------------------------
  typedef struct {
    int     ca, cb;
    int     case_no, group;
    longint tpl;
  } sq_info_t;

  // value of one column of the folded array
  function automatic int sq_col_sum(logic [N-1:0] a, int col);
    int s = 0;
    for (int i = 0; i < N; i++) begin
      for (int j = i; j < N; j++) begin
        int c;
        bit v;
        if (j == i) begin                 // a_i^2 = a_i, weight 2^(2i)
          c = 2 * i;
          v = a[i] & ((i == 0) ? 1'b1 : ~a[i-1]);
        end else if (j == i + 1) begin    // a_i a_(i+1) moved one column up
          c = i + j + 2;
          v = a[i] & a[j];
        end else begin
          c = i + j + 1;
          v = a[i] & a[j];
        end
        if (c == col && v) s++;
      end
    end
    return s;
  endfunction

  function automatic sq_info_t sq_info(logic [N-1:0] a);
    sq_info_t r;
    r.tpl = 0;
    for (int col = 0; col <= N - 2; col++)
      r.tpl += longint'(sq_col_sum(a, col)) << col;
    r.ca = sq_col_sum(a, N - 2);
    r.cb = a[6];
    case (r.ca)
      0:       r.case_no = 1;
      1:       r.case_no = 2 + r.cb;
      2:       r.case_no = 4 + r.cb;
      default: r.case_no = r.ca + 3;
    endcase
    r.group = (r.case_no <= 2) ? 1 : (r.case_no <= 4) ? 2 : (r.case_no <= 6) ? 3 : r.case_no - 3;
    return r;
  endfunction

  function automatic int sq_theta(int case_no);
    int t[10] = '{0, 0, 1, 1, 2, 2, 3, 4, 5, 6};
    return t[case_no - 1];
  endfunction

  function automatic longint sq_stpl(int case_no);
    longint t[10] = '{14398, 29747, 40698, 53300, 66414, 84555, 111188, 139448, 169332, 200835};
    return t[case_no - 1];
  endfunction

  function automatic logic [N-1:0] sq_fixed_ref(logic [N-1:0] a);
    sq_info_t s = sq_info(a);
    longint kept = longint'(a) * longint'(a) - s.tpl;
    return N'((kept + longint'(sq_theta(s.case_no) + 1) * (longint'(1) << (N - 1))) >> N);
  endfunction

  function automatic logic [2*N-1:0] sq_full_ref(logic [N-1:0] a);
    sq_info_t s = sq_info(a);
    return (2*N)'(longint'(a) * longint'(a) - s.tpl + sq_stpl(s.case_no));
  endfunction

  // ------------------------------------------------------------------
  // Squarer with extra operand-bit signatures. The group of an operand is
  // {CA, first nx bits of a6, a7, a13, a0, a4, a5, a8}. The table is built
  // here from scratch: for every group, the theta in 0..7 with the smallest
  // largest error over all operands of the group (smaller theta on a tie).
  // ------------------------------------------------------------------
  typedef int int_da_t[];

  function automatic int sq_xsig_index(logic [N-1:0] a, int nx);
    int bits[7] = '{6, 7, 13, 0, 4, 5, 8};
    int g = sq_col_sum(a, N - 2);
    for (int s = 0; s < nx; s++) g = 2 * g + int'(a[bits[s]]);
    return g;
  endfunction

  function automatic logic [N-1:0] sq_xsig_fixed_ref(logic [N-1:0] a, int theta);
    sq_info_t s = sq_info(a);
    longint kept = longint'(a) * longint'(a) - s.tpl;
    return N'((kept + longint'(theta + 1) * (longint'(1) << (N - 1))) >> N);
  endfunction

  // largest |error| per (group, theta), then the best theta per group
  function automatic int_da_t sq_xsig_table(int nx);
    int_da_t tbl = new[8 << nx];
    longint  emax[] = new[(8 << nx) * 8];
    foreach (emax[i]) emax[i] = -1;
    for (int x = 0; x < (1 << N); x++) begin
      logic [N-1:0] a     = N'(x);
      int           g     = sq_xsig_index(a, nx);
      sq_info_t     s     = sq_info(a);
      longint       exact = longint'(a) * longint'(a);
      longint       kept  = exact - s.tpl;
      for (int t = 0; t < 8; t++) begin
        longint out = ((kept + longint'(t + 1) * (longint'(1) << (N - 1))) >> N) << N;
        longint e   = (out > exact) ? out - exact : exact - out;
        if (e > emax[8 * g + t]) emax[8 * g + t] = e;
      end
    end
    foreach (tbl[g]) begin
      tbl[g] = 0;
      for (int t = 1; t < 8; t++)
        if (emax[8 * g + t] < emax[8 * g + tbl[g]]) tbl[g] = t;
    end
    return tbl;
  endfunction

endpackage
