// lane_adder: one of the four lane adders of the packed ALU.
//
// Adds or subtracts two W-bit two's-complement operands; the result wraps
// modulo 2^W. The four adders are the ALU's only arithmetic: every packed add,
// every horizontal add and every transform butterfly runs through them.
// The document draws them as 8-bit adders; here W defaults to the 8-bit lane
// plus three guard bits, so that a horizontal sum of four lanes, each possibly
// doubled, is exact before it is saturated (a choice of this design).
// Purely combinational.
module lane_adder #(
  parameter int unsigned W = 11
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,  // 1: a - b, 0: a + b
  output logic [W-1:0] y
);
  always_comb y = sub ? (a - b) : (a + b);
endmodule
