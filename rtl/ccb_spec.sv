// ccb_spec: SPEC carry speculator of one carry cut-back module.
//
// Predicts the carry that leaves the SPEC_W operand bits lying directly below the
// carry cut, using those bits only and a fixed carry-in guess in place of the real
// carry from further down.  Written in carry-lookahead form: the group generate and
// group propagate of the slice are built from the per-bit g = a AND b and
// p = a XOR b, and the predicted carry is G OR (P AND guess).  The prediction is
// wrong only when the whole slice propagates and the guess differs from the real
// carry into it.
//
// Interface: a, b are the SPEC_W bits just below the cut (bit 0 lowest); the
// GUESS parameter is the constant carry assumed into the slice; carry is the
// predicted carry into the cut position.  Purely combinational.
module ccb_spec #(
  parameter int unsigned SPEC_W = 2,
  parameter bit          GUESS  = 1'b0
) (
  input  logic [SPEC_W-1:0] a,
  input  logic [SPEC_W-1:0] b,
  output logic              carry
);

  logic grp_g;  // some bit generates and every bit above it propagates
  logic grp_p;  // every bit propagates

  always_comb begin
    grp_g = 1'b0;
    grp_p = 1'b1;
    for (int i = 0; i < int'(SPEC_W); i++) begin
      grp_g = (a[i] & b[i]) | ((a[i] ^ b[i]) & grp_g);
      grp_p = grp_p & (a[i] ^ b[i]);
    end
    carry = grp_g | (grp_p & GUESS);
  end

endmodule
