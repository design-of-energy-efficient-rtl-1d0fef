// final_adder: carry-propagate adder that turns the two compressed rows into
// the result.
//
// A ripple chain: a 2:2 compressor (half adder) in bit 0, where there is no
// carry in, and a 3:2 compressor (full adder) in every higher bit. The carry
// out of the top bit is dropped, so y = (x0 + x1) mod 2^W.
// Purely combinational, no clock; the delay grows linearly with W.
module final_adder #(
  parameter int unsigned W = 17
) (
  input  logic [W-1:0] x0,
  input  logic [W-1:0] x1,
  output logic [W-1:0] y
);
  logic [W:1] c;   // c[k] is the carry into bit k; c[W] is dropped

  comp22 u_b0 (.in1(x0[0]), .in2(x1[0]), .out1(y[0]), .out2(c[1]));

  for (genvar k = 1; k < W; k++) begin : g_bit
    comp32 u_fa (.in1(x0[k]), .in2(x1[k]), .in3(c[k]), .out1(y[k]), .out2(c[k+1]));
  end
endmodule
