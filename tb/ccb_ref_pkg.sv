// ccb_ref_pkg: bit-serial reference model of a carry cut-back adder, for testbenches.
//
// ref_sum() walks the operands one bit at a time, as a ripple adder would, and at each
// cut position decides from the operand bits alone whether the carry is replaced:
// the PROP slice ADD1_W bits above the cut must fully propagate; the replacement is
// the guess itself (straight cut) or the carry out of the SPEC_W bits below the cut
// computed with the guess as carry in.  It shares no code with the RTL.
// re_bound() is the worst-case relative error of such an adder: 2^m over
// (2^m + PROP weight) when guessing 0, 2^m over (SPEC weight + PROP weight) when
// guessing 1, m being the cut position.
package ccb_ref_pkg;

  typedef struct {
    int width;
    int n_cut;
    int add1;
    int prop;
    int add3;
    int spec;
    bit guess;
    int first;
  } ccb_cfg_t;

  function automatic int cut_pos(ccb_cfg_t c, int k);
    return c.first + k * (c.add1 + c.prop + c.add3);
  endfunction

  // Cut flags the adder should raise.
  function automatic logic [63:0] ref_cuts(ccb_cfg_t c, logic [63:0] a, logic [63:0] b);
    logic [63:0] r = '0;
    for (int k = 0; k < c.n_cut; k++) begin
      bit all_p = 1'b1;
      for (int j = cut_pos(c, k) + c.add1; j < cut_pos(c, k) + c.add1 + c.prop; j++)
        if (a[j] == b[j]) all_p = 1'b0;
      r[k] = all_p;
    end
    return r;
  endfunction

  function automatic logic [64:0] ref_sum(ccb_cfg_t c, logic [63:0] a, logic [63:0] b);
    logic [64:0] s = '0;
    logic        carry = 1'b0;
    logic [63:0] cuts = ref_cuts(c, a, b);
    for (int i = 0; i < c.width; i++) begin
      for (int k = 0; k < c.n_cut; k++) begin
        if (i == cut_pos(c, k) && cuts[k]) begin
          if (c.spec == 0) carry = c.guess;
          else begin
            logic g = c.guess;
            for (int j = i - c.spec; j < i; j++) g = (a[j] & b[j]) | (g & (a[j] | b[j]));
            carry = g;
          end
        end
      end
      s[i]  = a[i] ^ b[i] ^ carry;
      carry = (a[i] & b[i]) | (carry & (a[i] ^ b[i]));
    end
    s[c.width] = carry;
    return s;
  endfunction

  function automatic real re_bound(ccb_cfg_t c);
    real m    = 2.0 ** cut_pos(c, 0);
    real prop = 0.0;
    real spec = 0.0;
    for (int j = cut_pos(c, 0) + c.add1; j < cut_pos(c, 0) + c.add1 + c.prop; j++)
      prop += 2.0 ** j;
    for (int j = cut_pos(c, 0) - c.spec; j < cut_pos(c, 0); j++) spec += 2.0 ** j;
    return c.guess ? m / (spec + prop) : m / (m + prop);
  endfunction

  // Bound that also holds when several modules err at once with guess 0: each error
  // 2^m is set against its own PROP weight only.  The PROP slices of different
  // modules are disjoint, so the ratio survives any number of simultaneous errors.
  // (The tighter guess-0 bound counts a carry-generating bit below the cut that a
  // second error higher up can share; it is then exceeded by a small margin.)
  function automatic real re_bound_multi(ccb_cfg_t c);
    real prop = 0.0;
    for (int j = cut_pos(c, 0) + c.add1; j < cut_pos(c, 0) + c.add1 + c.prop; j++)
      prop += 2.0 ** j;
    return c.guess ? re_bound(c) : (2.0 ** cut_pos(c, 0)) / prop;
  endfunction

  // Mask with a 1 at every cut position: a same-direction CCB adder only ever errs by
  // a sum of distinct 2^m terms, one per cut position.
  function automatic logic [64:0] cut_mask(ccb_cfg_t c);
    logic [64:0] m = '0;
    for (int k = 0; k < c.n_cut; k++) m[cut_pos(c, k)] = 1'b1;
    return m;
  endfunction

endpackage
