// comp32: 3:2 compressor, i.e. a full adder.
//
// Adds three bits of the same column: out1 = in1 ^ in2 ^ in3 stays in the
// column, out2 is the majority of the three inputs and carries into the next
// column, so in1 + in2 + in3 = out1 + 2*out2.
// Purely combinational, no clock.
module comp32 (
  input  logic in1,
  input  logic in2,
  input  logic in3,
  output logic out1,   // weight 1
  output logic out2    // weight 2
);
  assign out1 = in1 ^ in2 ^ in3;
  assign out2 = (in1 & in2) | (in2 & in3) | (in1 & in3);
endmodule
