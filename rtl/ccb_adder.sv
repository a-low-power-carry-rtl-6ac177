// ccb_adder: carry cut-back (CCB) approximate adder, unsigned, WIDTH bits.
//
// Idea: a ripple/segmented carry chain is only slow when a carry has to cross it from
// end to end.  N_CUT cut-back modules are spread along the chain; each watches a short
// higher-significance slice (PROP, over segment ADD2) and, when that slice fully
// propagates, replaces the carry entering the slice's lower neighbour ADD1 by a guess.
// No operand pair can then activate the full chain, so the effective critical path is
// a few segments long.  An error needs the PROP slice to propagate and the guess to be
// wrong; its magnitude is then 2^m, m being the cut position, while the exact sum is at
// least about 2^(m+ADD1_W) * (2^PROP_W - 1).  The worst-case relative error therefore
// depends only on ADD1_W, PROP_W (and SPEC_W with the guess), not on WIDTH: a bounded
// relative precision, like floating point, on a fixed-point datapath.
//
// Layout from bit 0 upwards (see ccb_pkg):
//   ADD_first (FIRST_W) | ADD1 ADD2 | ADD3 | ADD1 ADD2 | ... | ADD1 ADD2 | ADD_last
// Each module k cuts at bit c_k = FIRST_W + k*(ADD1_W+PROP_W+ADD3_W) and its PROP
// covers bits c_k+ADD1_W .. c_k+ADD1_W+PROP_W-1.  An optional SPEC covers the SPEC_W
// bits just below the cut (the top of ADD_first or of the ADD3 segment below).
//
// Defaults are the 32-bit configuration (4,4,2,0,0): four OR-cut modules, ADD1 = 4,
// PROP = 2, no ADD3, no SPEC, which gives a worst-case relative error of
// 1/(2^4 * 3) = 2.1 %.  The split of the 8 spare bits into ADD_first = 4 and
// ADD_last = 4 is this design's choice (it does not change the error bound).
// Sum width WIDTH+1 (carry out on top) and a zero carry in are also choices here.
//
// Interface: a, b (WIDTH bits, unsigned); sum (WIDTH+1 bits); cut (one flag per
// module, 1 when that module replaced its carry).  Purely combinational; a false-path
// constraint from below each cut through its PROP slice is needed for timing analysis
// to see the short effective paths.  Two immediate assertions check the error rules
// in simulation (no error without a cut; errors only at cut-position weights); they
// leave no logic behind in synthesis.
module ccb_adder
  import ccb_pkg::*;
#(
  parameter int unsigned WIDTH   = 32,
  parameter int unsigned N_CUT   = 4,
  parameter int unsigned ADD1_W  = 4,
  parameter int unsigned PROP_W  = 2,
  parameter int unsigned ADD3_W  = 0,
  parameter int unsigned SPEC_W  = 0,
  parameter bit          GUESS   = 1'b1,
  parameter int unsigned FIRST_W = ccb_first_w(WIDTH, N_CUT, ADD1_W, PROP_W, ADD3_W)
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH:0]   sum,
  output logic [N_CUT-1:0] cut
);

  localparam int LAST_W = ccb_last_w(WIDTH, N_CUT, FIRST_W, ADD1_W, PROP_W, ADD3_W);
  localparam int SW     = (SPEC_W == 0) ? 1 : SPEC_W;

  // Configuration rules.
  if (N_CUT < 1 || ADD1_W < 1 || PROP_W < 1 || FIRST_W < 1 || LAST_W < 0) begin : g_bad_layout
    $error("ccb_adder: layout does not fit in WIDTH");
  end
  if (SPEC_W > FIRST_W || (N_CUT > 1 && SPEC_W > ADD3_W + PROP_W)) begin : g_bad_spec
    $error("ccb_adder: SPEC slice reaches below the segment under the cut");
  end

  // Carries at segment boundaries.
  logic [N_CUT-1:0] c_at_cut;    // real carry arriving at cut k
  logic [N_CUT-1:0] c_into_add1; // carry handed to ADD1 of module k
  logic [N_CUT-1:0] c_into_add2;
  logic [N_CUT-1:0] c_out_add2;

  // ADD_first
  ccb_segment #(.W(FIRST_W)) u_add_first (
    .a   (a[FIRST_W-1:0]),
    .b   (b[FIRST_W-1:0]),
    .cin (1'b0),
    .sum (sum[FIRST_W-1:0]),
    .cout(c_at_cut[0])
  );

  for (genvar k = 0; k < N_CUT; k++) begin : g_cut
    localparam int CPOS = ccb_cut_pos(k, FIRST_W, ADD1_W, PROP_W, ADD3_W);
    localparam int PPOS = CPOS + ADD1_W;
    localparam int TPOS = PPOS + PROP_W;   // first bit above the PROP slice
    localparam int SPOS = CPOS - SW;       // lowest SPEC bit

    ccb_module #(.PROP_W(PROP_W), .SPEC_W(SPEC_W), .GUESS(GUESS)) u_ccb (
      .prop_a   (a[TPOS-1:PPOS]),
      .prop_b   (b[TPOS-1:PPOS]),
      .spec_a   (a[CPOS-1:SPOS]),
      .spec_b   (b[CPOS-1:SPOS]),
      .carry_in (c_at_cut[k]),
      .carry_out(c_into_add1[k]),
      .cut      (cut[k])
    );

    // ADD1: from the cut up to the PROP slice
    ccb_segment #(.W(ADD1_W)) u_add1 (
      .a   (a[PPOS-1:CPOS]),
      .b   (b[PPOS-1:CPOS]),
      .cin (c_into_add1[k]),
      .sum (sum[PPOS-1:CPOS]),
      .cout(c_into_add2[k])
    );

    // ADD2: the slice watched by PROP, reduced to a sum generator
    ccb_segment #(.W(PROP_W)) u_add2 (
      .a   (a[TPOS-1:PPOS]),
      .b   (b[TPOS-1:PPOS]),
      .cin (c_into_add2[k]),
      .sum (sum[TPOS-1:PPOS]),
      .cout(c_out_add2[k])
    );

    if (k < N_CUT - 1) begin : g_mid
      if (ADD3_W > 0) begin : g_add3
        ccb_segment #(.W(ADD3_W)) u_add3 (
          .a   (a[TPOS+ADD3_W-1:TPOS]),
          .b   (b[TPOS+ADD3_W-1:TPOS]),
          .cin (c_out_add2[k]),
          .sum (sum[TPOS+ADD3_W-1:TPOS]),
          .cout(c_at_cut[k+1])
        );
      end else begin : g_no_add3
        assign c_at_cut[k+1] = c_out_add2[k];
      end
    end else begin : g_last
      if (LAST_W > 0) begin : g_add_last
        ccb_segment #(.W(LAST_W)) u_add_last (
          .a   (a[WIDTH-1:TPOS]),
          .b   (b[WIDTH-1:TPOS]),
          .cin (c_out_add2[k]),
          .sum (sum[WIDTH-1:TPOS]),
          .cout(sum[WIDTH])
        );
      end else begin : g_no_last
        assign sum[WIDTH] = c_out_add2[k];
      end
    end
  end

  // Error rules of a same-direction CCB adder, checked in simulation: with no cut the
  // sum is exact, and any error is a sum of distinct cut-position weights 2^c_k, added
  // when GUESS = 1 and subtracted when GUESS = 0.
  logic [WIDTH:0] cut_weights;
  logic [WIDTH:0] exact_sum;
  logic [WIDTH:0] error_mag;

  always_comb begin
    cut_weights = '0;
    for (int k = 0; k < int'(N_CUT); k++)
      cut_weights[ccb_cut_pos(k, FIRST_W, ADD1_W, PROP_W, ADD3_W)] = 1'b1;
    exact_sum = {1'b0, a} + {1'b0, b};
    error_mag = GUESS ? sum - exact_sum : exact_sum - sum;
    if (cut == '0)
      assert (sum == exact_sum) else $error("ccb_adder: error without a cut");
    assert ((error_mag & ~cut_weights) == '0)
      else $error("ccb_adder: error not made of cut-position weights");
  end

endmodule
