// ccb_module: one carry cut-back (CCB) module.
//
// A CCB module links two positions of the carry chain.  Its PROP detector watches a
// higher-significance slice (ADD2); when the whole slice propagates it raises `cut`
// and the carry entering the lower-significance ADD1 segment is replaced by a guess.
// This is a quasi-feedback from a high to a low position: a carry can no longer run
// from below the cut all the way through ADD1 and ADD2, so the long chain becomes a
// false path.
//
// Two forms of the cut gate are provided, selected by SPEC_W:
//   SPEC_W = 0  straight cut.  The cut signal itself is the guess:
//               GUESS = 1 gives an OR gate  (carry_out = carry_in OR cut),
//               GUESS = 0 gives the opposite direction (carry_out = carry_in AND NOT cut).
//   SPEC_W > 0  a SPEC block predicts the carry from the SPEC_W bits right below the
//               cut with GUESS as its carry in, and a multiplexer passes that
//               prediction when cut = 1 and the real carry otherwise.
// The OR-cut and the SPEC-plus-multiplexer forms follow the design; the AND-cut for a
// straight cut guessing 0 is this design's completion of the "guess direction" option.
// All modules of one adder must use the same guess direction, which the parent
// enforces by passing one GUESS to all of them.
//
// Interface: prop_a/prop_b are the PROP_W bits of ADD2, spec_a/spec_b the bits under
// the cut (width max(SPEC_W,1); unused when SPEC_W = 0), carry_in is the real carry
// arriving at the cut, carry_out the carry handed to ADD1, cut the PROP flag.
// Purely combinational.
module ccb_module #(
  parameter int unsigned PROP_W = 2,
  parameter int unsigned SPEC_W = 0,
  parameter bit          GUESS  = 1'b1,
  localparam int unsigned SW    = (SPEC_W == 0) ? 1 : SPEC_W
) (
  input  logic [PROP_W-1:0] prop_a,
  input  logic [PROP_W-1:0] prop_b,
  input  logic [SW-1:0]     spec_a,
  input  logic [SW-1:0]     spec_b,
  input  logic              carry_in,
  output logic              carry_out,
  output logic              cut
);

  ccb_prop #(.PROP_W(PROP_W)) u_prop (
    .a  (prop_a),
    .b  (prop_b),
    .cut(cut)
  );

  if (SPEC_W == 0) begin : g_straight
    // spec_a/spec_b are not used by a straight cut.
    if (GUESS) begin : g_or
      always_comb carry_out = carry_in | cut;
    end else begin : g_and
      always_comb carry_out = carry_in & ~cut;
    end
  end else begin : g_spec
    logic spec_carry;
    ccb_spec #(.SPEC_W(SPEC_W), .GUESS(GUESS)) u_spec (
      .a    (spec_a),
      .b    (spec_b),
      .carry(spec_carry)
    );
    always_comb carry_out = cut ? spec_carry : carry_in;
  end

endmodule
