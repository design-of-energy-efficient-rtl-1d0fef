// mult_signature_gen: signature generator of the Booth multiplier's ECU.
//
// Compresses the Booth encoder outputs and the multiplicand into three
// signatures that classify an input pair:
//   CA = number of zero partial products (sum of the encoders' z bits)
//   CB = number of negative digits        (sum of the encoders' n bits)
//   FA = 1 when at least N/2 bits of the multiplicand A are set
// CA and CB are plain carry-propagate sums of the N/2 one-bit flags. FA comes
// from a bit-sorting network over A: after sorting, position N/2-1 holds a
// one exactly when N/2 or more bits of A are ones.
// The z and n inputs are the encoders already present in the multiplier, so
// the generator only adds the two counters and the sorting network.
// Purely combinational, no clock.
module mult_signature_gen #(
  parameter int unsigned N = 16
) (
  input  logic [N/2-1:0]           z,
  input  logic [N/2-1:0]           n,
  input  logic [N-1:0]             a,
  output logic [$clog2(N/2+1)-1:0] ca,
  output logic [$clog2(N/2+1)-1:0] cb,
  output logic                     fa
);
  localparam int unsigned CW = $clog2(N/2 + 1);

  logic [N-1:0] a_sorted;

  always_comb begin
    ca = '0;
    cb = '0;
    for (int unsigned i = 0; i < N/2; i++) begin
      ca = ca + CW'(z[i]);
      cb = cb + CW'(n[i]);
    end
  end

  sorting_network #(.N(N)) u_sort (
    .in  (a),
    .out (a_sorted)
  );

  assign fa = a_sorted[N/2-1];
endmodule
