// booth_encoder: radix-4 Booth encoder for one partial product.
//
// Looks at three overlapping multiplier bits {b(2i+1), b(2i), b(2i-1)} and
// produces five control signals:
//   s  - the partial product magnitude is 1*A
//   d  - the partial product magnitude is 2*A
//   n  - the digit is negative (this is b(2i+1) itself)
//   z  - the partial product is zero (bits 000 or 111)
//   c  - a +1 correction must be added at the row's least significant column
//        to complete the two's complement of a negative, non-zero row
// s = b(2i) ^ b(2i-1); d = !s & (b(2i+1) ^ b(2i)); z = all three bits equal;
// c = n & !z. The c output follows the encoder truth table rather than a
// plain copy of the sign bit: for 111 the row is forced to zero instead of
// being inverted, so no correction is needed.
// Purely combinational, no clock.
module booth_encoder (
  input  logic b_hi,   // b(2i+1)
  input  logic b_mid,  // b(2i)
  input  logic b_lo,   // b(2i-1), 0 for the first partial product
  output logic s,
  output logic d,
  output logic n,
  output logic z,
  output logic c
);
  assign s = b_mid ^ b_lo;
  assign d = ~s & (b_hi ^ b_mid);
  assign n = b_hi;
  assign z = ~((b_mid ^ b_hi) | (b_hi ^ b_lo));
  assign c = b_hi & ~z;
endmodule
