// ccb_segment: one sum-generator segment of the carry chain.
//
// Adds two W-bit operand slices and a carry in, giving W sum bits and the carry out.
// The CCB adder is a chain of such segments (ADD_first, ADD1, ADD2, ADD3, ADD_last);
// the full chain is physically present, the cut-back modules only decide which carry
// enters each ADD1.  The segment's internal adder architecture is left to synthesis
// (a plain `+`), which matches the design's intent of letting the tool pick the
// structure that fits the timing target for every segment.
//
// Interface: a, b (W bits), cin; sum (W bits), cout.  Purely combinational.
module ccb_segment #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  always_comb {cout, sum} = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};

endmodule
