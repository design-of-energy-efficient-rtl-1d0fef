// booth_selector: one bit pp(i,j) of a radix-4 Booth partial product.
//
// Picks a(j) when the encoder says the magnitude is A (s = 1) or a(j-1) when
// it is 2A (d = 1); at most one of s and d is set, and neither for a zero row.
// The selected bit is then inverted when the row is negative, forming the
// one's complement; the missing +1 is the encoder's c bit, added separately
// in the array. The polarity input is the encoder's c (sign of a non-zero
// row), so the 111 pattern yields an all-zero row with no correction.
// Purely combinational, no clock.
module booth_selector (
  input  logic a_j,    // multiplicand bit j
  input  logic a_jm1,  // multiplicand bit j-1 (0 for j = 0)
  input  logic s,
  input  logic d,
  input  logic neg,    // invert the row (encoder output c)
  output logic pp
);
  assign pp = ((a_j & s) | (a_jm1 & d)) ^ neg;
endmodule
