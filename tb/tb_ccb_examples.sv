// tb_ccb_examples: the two worked additions of the CCB design, plus the guess-0 forms.
//
// (a) 17-bit adder, two modules with 2-bit PROP, 2-bit ADD1, 4-bit ADD3, 2-bit SPEC and
//     guess 0, ADD_first = 4:  0x09EFF + 0x00A02 = 43265 exactly; the lower module cuts
//     with a SPEC prediction of 0 while the real carry is 1, so the result is 43249
//     (error 16 = 2^4, the weight of the cut position).
// (b) 16-bit adder, three OR-cut modules with 1-bit PROP, 3-bit ADD1, 1-bit ADD3,
//     ADD_first = 1:  0x4A72 + 0x4020 = 35474 exactly; two modules cut, one of them
//     by luck agrees with the real carry, the other adds 2 = 2^1: result 35476.
// Both configurations, and a 32-bit AND-cut (straight cut guessing 0) and a 32-bit
// SPEC adder guessing 1, are then run on random operands against the reference model.
// The guess-0 adder is held to the multi-error bound (error over PROP weight): with two
// modules erring at once it can exceed the single-error bound 2^m/(2^m + PROP) by a
// little, and how often that happens is reported.
module tb_ccb_examples;
  import ccb_ref_pkg::*;

  localparam ccb_cfg_t CFG_A = '{width: 17, n_cut: 2, add1: 2, prop: 2, add3: 4, spec: 2,
                                 guess: 1'b0, first: 4};
  localparam ccb_cfg_t CFG_B = '{width: 16, n_cut: 3, add1: 3, prop: 1, add3: 1, spec: 0,
                                 guess: 1'b1, first: 1};
  localparam ccb_cfg_t CFG_C = '{width: 32, n_cut: 4, add1: 4, prop: 2, add3: 0, spec: 0,
                                 guess: 1'b0, first: 4};
  localparam ccb_cfg_t CFG_D = '{width: 32, n_cut: 2, add1: 5, prop: 2, add3: 2, spec: 2,
                                 guess: 1'b1, first: 6};

  int checks = 0, failures = 0;
  logic [31:0] a, b;
  logic [17:0] sum_a;  logic [1:0] cut_a;
  logic [16:0] sum_b;  logic [2:0] cut_b;
  logic [32:0] sum_c;  logic [3:0] cut_c;
  logic [32:0] sum_d;  logic [1:0] cut_d;
  int n_err_c = 0, n_err_d = 0, n_over_tight = 0;

  ccb_adder #(.WIDTH(17), .N_CUT(2), .ADD1_W(2), .PROP_W(2), .ADD3_W(4), .SPEC_W(2),
              .GUESS(1'b0), .FIRST_W(4))
    dut_a (.a(a[16:0]), .b(b[16:0]), .sum(sum_a), .cut(cut_a));
  ccb_adder #(.WIDTH(16), .N_CUT(3), .ADD1_W(3), .PROP_W(1), .ADD3_W(1), .SPEC_W(0),
              .GUESS(1'b1), .FIRST_W(1))
    dut_b (.a(a[15:0]), .b(b[15:0]), .sum(sum_b), .cut(cut_b));
  ccb_adder #(.GUESS(1'b0))
    dut_c (.a(a), .b(b), .sum(sum_c), .cut(cut_c));
  ccb_adder #(.N_CUT(2), .ADD1_W(5), .PROP_W(2), .ADD3_W(2), .SPEC_W(2), .GUESS(1'b1),
              .FIRST_W(6))
    dut_d (.a(a), .b(b), .sum(sum_d), .cut(cut_d));

  task automatic check(string what, logic [64:0] got, logic [64:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures <= 20) $display("FAIL %s a=%h b=%h got=%h want=%h", what, a, b, got, want);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // (a)
    a = 32'h0_9EFF; b = 32'h0_0A02; #1;
    check("fig a exact", 65'(a) + 65'(b), 65'd43265);
    check("fig a sum", 65'(sum_a), 65'd43249);
    check("fig a cuts", 65'(cut_a), 65'b01);
    // (b)
    a = 32'h4A72; b = 32'h4020; #1;
    check("fig b exact", 65'(a) + 65'(b), 65'd35474);
    check("fig b sum", 65'(sum_b), 65'd35476);
    check("fig b cuts", 65'(cut_b), 65'b011);
    for (int i = 0; i < 200000; i++) begin
      logic [64:0] exact;
      a = $urandom; b = $urandom;
      if (i[0]) begin a = a >> ($urandom % 32); b = b >> ($urandom % 32); end
      #1;
      exact = 65'(a) + 65'(b);
      check("rand a", 65'(sum_a), ref_sum(CFG_A, 64'(a[16:0]), 64'(b[16:0])));
      check("rand a cut", 65'(cut_a), 65'(ref_cuts(CFG_A, 64'(a[16:0]), 64'(b[16:0]))));
      check("rand b", 65'(sum_b), ref_sum(CFG_B, 64'(a[15:0]), 64'(b[15:0])));
      check("rand c", 65'(sum_c), ref_sum(CFG_C, 64'(a), 64'(b)));
      check("rand d", 65'(sum_d), ref_sum(CFG_D, 64'(a), 64'(b)));
      // Same-direction guesses: guess 0 only ever loses a carry, guess 1 only adds one.
      checks += 2;
      if (65'(sum_c) > exact || ((exact - 65'(sum_c)) & ~cut_mask(CFG_C)) != 0) begin
        failures++; if (failures <= 20) $display("FAIL guess-0 error shape a=%h b=%h", a, b);
      end
      if (65'(sum_d) < exact || ((65'(sum_d) - exact) & ~cut_mask(CFG_D)) != 0) begin
        failures++; if (failures <= 20) $display("FAIL guess-1 error shape a=%h b=%h", a, b);
      end
      if (65'(sum_c) != exact) n_err_c++;
      if (65'(sum_d) != exact) n_err_d++;
      if (exact != 0) begin
        checks += 2;
        if (real'(exact - 65'(sum_c)) / real'(exact) > re_bound_multi(CFG_C) * (1.0 + 1e-9))
        begin
          failures++; if (failures <= 20) $display("FAIL guess-0 bound a=%h b=%h", a, b);
        end
        if (real'(exact - 65'(sum_c)) / real'(exact) > re_bound(CFG_C) * (1.0 + 1e-9))
          n_over_tight++;
        if (real'(65'(sum_d) - exact) / real'(exact) > re_bound(CFG_D) * (1.0 + 1e-9)) begin
          failures++; if (failures <= 20) $display("FAIL guess-1 bound a=%h b=%h", a, b);
        end
      end
    end
    checks += 2;
    if (n_err_c == 0) begin failures++; if (failures <= 20) $display("FAIL guess-0 adder never erred"); end
    if (n_err_d == 0) begin failures++; if (failures <= 20) $display("FAIL SPEC adder never erred"); end
    $display("errors: AND-cut %0d, SPEC %0d; AND-cut results above the single-error bound %0d",
             n_err_c, n_err_d, n_over_tight);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
