// sorting_network: Batcher odd-even merge sorting network for single bits.
//
// Sorts N one-bit inputs so that all ones come first: out[k] = 1 exactly when
// more than k inputs are 1 (a thermometer code of the input count). Each
// compare-exchange cell is an OR (the max, kept at the lower index) and an AND
// (the min, kept at the higher index). The inputs are padded with zeros to the
// next power of two P; the network has log2(P)*(log2(P)+1)/2 layers and the
// comparator pattern of the classic iterative odd-even merge sort.
// Used to test whether at least N/2 bits of a word are set, and to count the
// signals of one squarer column.
// Purely combinational, no clock.
module sorting_network #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] in,
  output logic [N-1:0] out    // out[k] = (number of ones in 'in') > k
);
  function automatic int unsigned clog2_min1(int unsigned v);
    int unsigned r = 0;
    while ((1 << r) < v) r++;
    return (r == 0) ? 1 : r;
  endfunction

  localparam int unsigned L      = clog2_min1(N);
  localparam int unsigned P      = 1 << L;
  localparam int unsigned STAGES = L * (L + 1) / 2;

  // Is element x the lower partner of a compare-exchange in the layer with
  // merge size p and distance k?
  function automatic bit is_low(int unsigned msz, int unsigned k, int unsigned x);
    int unsigned j0 = k % msz;
    if (x < j0) return 1'b0;
    if (((x - j0) % (2 * k)) >= k) return 1'b0;
    if (x + k >= P) return 1'b0;
    return (x / (2 * msz)) == ((x + k) / (2 * msz));
  endfunction

  logic [P-1:0] layer [STAGES+1];

  assign layer[0] = P'(in);

  for (genvar gp = 0; gp < L; gp++) begin : g_p
    for (genvar gk = gp; gk >= 0; gk--) begin : g_k
      localparam int unsigned S  = gp * (gp + 1) / 2 + (gp - gk);
      localparam int unsigned PP = 1 << gp;
      localparam int unsigned K  = 1 << gk;
      for (genvar x = 0; x < P; x++) begin : g_x
        if (is_low(PP, K, x)) begin : g_lo
          assign layer[S+1][x] = layer[S][x] | layer[S][x+K];
        end else if (x >= K && is_low(PP, K, x - K)) begin : g_hi
          assign layer[S+1][x] = layer[S][x] & layer[S][x-K];
        end else begin : g_thru
          assign layer[S+1][x] = layer[S][x];
        end
      end
    end
  end

  assign out = layer[STAGES][N-1:0];
endmodule
