// comp42: 4:2 compressor, also counted as a 5:3 compressor.
//
// Takes four bits of one column (in1..in4) plus in5, the out3 of the
// compressor one column to the right, and returns
//   in1 + in2 + in3 + in4 + in5 = out1 + 2*(out2 + out3).
// out1 stays in the column; out2 and out3 move one column left, out3 as the
// in5 of the neighbouring compressor. out3 depends only on in1..in3, so a row
// of these cells has no rippling carry: the lateral path is one cell deep.
// Internally two full-adder stages: the first adds in1..in3 (sum x, carry
// out3), the second adds x, in4 and in5 (sum out1, carry out2).
// Purely combinational, no clock.
module comp42 (
  input  logic in1,
  input  logic in2,
  input  logic in3,
  input  logic in4,
  input  logic in5,    // lateral carry in from the column to the right
  output logic out1,   // weight 1
  output logic out2,   // weight 2
  output logic out3    // weight 2, lateral carry out to the column to the left
);
  logic x;
  assign x    = in1 ^ in2 ^ in3;
  assign out1 = x ^ in4 ^ in5;
  assign out2 = (in4 & in5) | (x & in4) | (x & in5);
  assign out3 = (in1 & in2) | (in2 & in3) | (in1 & in3);
endmodule
