// ccb_prop: PROP detector of one carry cut-back module.
//
// Watches a short, higher-significance slice of the two operands (the ADD2 segment)
// and raises `cut` when every bit of it propagates (a_i XOR b_i = 1).  Only then can
// a carry travel through the whole slice, so only then is the carry entering the
// lower ADD1 segment replaced by a guess; otherwise the carry chain is already broken
// inside the slice and the real carry is kept.  The propagate definition P = a XOR b
// follows the adder equations of the design; computing the group propagate as one
// wide AND (the lookahead form) is how it is written here.
//
// Interface: a, b are the PROP_W operand bits of the watched slice; cut is the
// group-propagate flag.  Purely combinational, no clock.
module ccb_prop #(
  parameter int unsigned PROP_W = 2
) (
  input  logic [PROP_W-1:0] a,
  input  logic [PROP_W-1:0] b,
  output logic              cut
);

  always_comb cut = &(a ^ b);

endmodule
