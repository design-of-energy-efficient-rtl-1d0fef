// compression_tree: reduces ROWS partial-product rows of W bits to two rows.
//
// Works level by level, every compressor of a level in parallel. At each
// level the rows are taken four at a time through a row of 4:2 compressors
// (four rows in, a sum row and a carry row out, the lateral out3->in5 link
// running between neighbouring columns but never more than one cell deep).
// Three rows left over go through a row of 3:2 compressors; one or two left
// over pass to the next level untouched. Ten rows need three levels
// (10 -> 6 -> 4 -> 2), nine rows need three (9 -> 5 -> 3 -> 2).
// All arithmetic is modulo 2^W: carries out of the top column are dropped,
// so sum_row + carry_row = sum of all input rows (mod 2^W).
// The carry bits out of the top column (cy[W-1], lat[W-1] of each 4:2 row)
// are left unconnected on purpose: they weigh 2^W.
// Purely combinational, no clock.
module compression_tree #(
  parameter int unsigned ROWS = 10,
  parameter int unsigned W    = 17
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum_row,
  output logic [W-1:0] carry_row
);
  function automatic int unsigned next_rows(int unsigned r);
    if (r <= 2) return r;
    return 2 * (r / 4) + (((r % 4) == 3) ? 2 : (r % 4));
  endfunction

  function automatic int unsigned rows_at(int unsigned lvl);
    int unsigned r = ROWS;
    for (int unsigned i = 0; i < lvl; i++) r = next_rows(r);
    return r;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned r = ROWS;
    int unsigned l = 0;
    while (r > 2) begin
      r = next_rows(r);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels();
  localparam int unsigned MAXR   = (ROWS < 2) ? 2 : ROWS;

  // Level l of the tree is the generate block g_lvl[l]; its array 'q' holds
  // the rows it hands to level l+1 (unused entries are zero). Level 0 is the
  // input. A separate array per level keeps the stages apart.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    logic [W-1:0] q [MAXR];

    if (l == 0) begin : g_src
      for (genvar r = 0; r < MAXR; r++) begin : g_row
        if (r < ROWS) begin : g_used
          assign q[r] = rows[r];
        end else begin : g_pad
          assign q[r] = '0;
        end
      end
    end else begin : g_red
      localparam int unsigned R   = rows_at(l - 1);
      localparam int unsigned G4  = R / 4;
      localparam int unsigned REM = R % 4;
      localparam int unsigned RN  = next_rows(R);

      // groups of four rows -> 4:2 compressor rows
      for (genvar g = 0; g < G4; g++) begin : g_c42
        logic [W-1:0] s, cy, lat;
        for (genvar k = 0; k < W; k++) begin : g_col
          comp42 u_c (
            .in1  (g_lvl[l-1].q[4*g+0][k]),
            .in2  (g_lvl[l-1].q[4*g+1][k]),
            .in3  (g_lvl[l-1].q[4*g+2][k]),
            .in4  (g_lvl[l-1].q[4*g+3][k]),
            .in5  ((k == 0) ? 1'b0 : lat[(k == 0) ? 0 : k-1]),
            .out1 (s[k]),
            .out2 (cy[k]),
            .out3 (lat[k])
          );
        end
        assign q[2*g]   = s;
        assign q[2*g+1] = {cy[W-2:0], 1'b0};
      end

      if (REM == 3) begin : g_c32
        logic [W-1:0] s, cy;
        for (genvar k = 0; k < W; k++) begin : g_col
          comp32 u_c (
            .in1  (g_lvl[l-1].q[4*G4+0][k]),
            .in2  (g_lvl[l-1].q[4*G4+1][k]),
            .in3  (g_lvl[l-1].q[4*G4+2][k]),
            .out1 (s[k]),
            .out2 (cy[k])
          );
        end
        assign q[2*G4]   = s;
        assign q[2*G4+1] = {cy[W-2:0], 1'b0};
      end else begin : g_pass
        for (genvar r = 0; r < REM; r++) begin : g_row
          assign q[2*G4+r] = g_lvl[l-1].q[4*G4+r];
        end
      end

      for (genvar r = RN; r < MAXR; r++) begin : g_unused
        assign q[r] = '0;
      end
    end
  end

  assign sum_row   = g_lvl[LEVELS].q[0];
  assign carry_row = g_lvl[LEVELS].q[1];
endmodule
