// comp22: 2:2 compressor, i.e. a half adder.
//
// Adds two bits of the same column and returns a two-bit result
// {out2, out1}: out1 is the sum bit (XOR), which stays in the column, and
// out2 is the carry (AND), which moves one column to the left.
// Purely combinational, no clock.
module comp22 (
  input  logic in1,
  input  logic in2,
  output logic out1,   // weight 1
  output logic out2    // weight 2
);
  assign out1 = in1 ^ in2;
  assign out2 = in1 & in2;
endmodule
