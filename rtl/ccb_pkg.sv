// ccb_pkg: layout helpers shared by the carry cut-back (CCB) approximate adder.
//
// A CCB adder is described by the quintuple (N_CUT, ADD1_W, PROP_W, ADD3_W, SPEC_W)
// plus the operand width and the width of the lowest segment ADD_first.  From the
// least significant bit upwards the adder is laid out as
//
//   ADD_first | {ADD1, ADD2} x N_CUT, separated by N_CUT-1 ADD3 segments | ADD_last
//
// where ADD2 is the segment watched by the PROP detector of the same module and the
// carry cut sits at the bottom of ADD1.  ADD_last takes whatever bits are left.
// The split of the leftover bits between ADD_first and ADD_last is not fixed by the
// layout rules; ccb_first_w() gives ADD_first the larger half, a choice of this design.
package ccb_pkg;

  // Bits left over once the cut-back modules and the ADD3 segments are placed.
  function automatic int ccb_spare_bits(int width, int n_cut, int add1_w, int prop_w,
                                        int add3_w);
    return width - n_cut * (add1_w + prop_w) - (n_cut - 1) * add3_w;
  endfunction

  // Default width of ADD_first: the upper half of the spare bits.
  function automatic int ccb_first_w(int width, int n_cut, int add1_w, int prop_w,
                                     int add3_w);
    return (ccb_spare_bits(width, n_cut, add1_w, prop_w, add3_w) + 1) / 2;
  endfunction

  // Bit position of the carry cut of module k (the carry entering its ADD1).
  function automatic int ccb_cut_pos(int k, int first_w, int add1_w, int prop_w,
                                     int add3_w);
    return first_w + k * (add1_w + prop_w + add3_w);
  endfunction

  // Bit position of the least significant PROP bit of module k.
  function automatic int ccb_prop_pos(int k, int first_w, int add1_w, int prop_w,
                                      int add3_w);
    return ccb_cut_pos(k, first_w, add1_w, prop_w, add3_w) + add1_w;
  endfunction

  // Width of ADD_last.
  function automatic int ccb_last_w(int width, int n_cut, int first_w, int add1_w,
                                    int prop_w, int add3_w);
    return width - first_w - n_cut * (add1_w + prop_w) - (n_cut - 1) * add3_w;
  endfunction

endpackage
