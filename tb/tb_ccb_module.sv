// tb_ccb_module: exhaustive check of one cut-back module in its three forms:
// OR-cut (no SPEC, guess 1), AND-cut (no SPEC, guess 0) and 2-bit SPEC with a
// multiplexer (guess 0).  The expected carry handed to ADD1 is the real carry when
// the PROP slice does not fully propagate, otherwise the guess or the SPEC prediction.
module tb_ccb_module;
  int checks = 0, failures = 0;
  logic [1:0] pa, pb, sa, sb;
  logic       cin;
  logic       co_or, cut_or, co_and, cut_and, co_sp, cut_sp;
  int         n_cut = 0, n_nocut = 0;

  ccb_module #(.PROP_W(2), .SPEC_W(0), .GUESS(1'b1)) d_or (
    .prop_a(pa), .prop_b(pb), .spec_a(sa[0:0]), .spec_b(sb[0:0]),
    .carry_in(cin), .carry_out(co_or), .cut(cut_or));
  ccb_module #(.PROP_W(2), .SPEC_W(0), .GUESS(1'b0)) d_and (
    .prop_a(pa), .prop_b(pb), .spec_a(sa[0:0]), .spec_b(sb[0:0]),
    .carry_in(cin), .carry_out(co_and), .cut(cut_and));
  ccb_module #(.PROP_W(2), .SPEC_W(2), .GUESS(1'b0)) d_sp (
    .prop_a(pa), .prop_b(pb), .spec_a(sa), .spec_b(sb),
    .carry_in(cin), .carry_out(co_sp), .cut(cut_sp));

  task automatic expect_bit(string what, logic got, logic want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures <= 20) $display("FAIL %s pa=%b pb=%b sa=%b sb=%b cin=%b got=%b want=%b",
               what, pa, pb, sa, sb, cin, got, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      logic all_p, spec_c;
      {cin, pa, pb, sa, sb} = 9'(i);
      #1;
      all_p  = (pa ^ pb) == 2'b11;
      spec_c = ((3'(sa) + 3'(sb)) >> 2) != 0;
      if (all_p) n_cut++; else n_nocut++;
      expect_bit("cut_or",  cut_or,  all_p);
      expect_bit("cut_and", cut_and, all_p);
      expect_bit("cut_sp",  cut_sp,  all_p);
      expect_bit("or",  co_or,  all_p ? 1'b1   : cin);
      expect_bit("and", co_and, all_p ? 1'b0   : cin);
      expect_bit("sp",  co_sp,  all_p ? spec_c : cin);
    end
    checks++;
    if (n_cut == 0 || n_nocut == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
