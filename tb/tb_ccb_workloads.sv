// tb_ccb_workloads: error characterisation of the 32-bit CCB configurations that the
// design's evaluation covers (30 quintuples (N_CUT, ADD1, PROP, ADD3, SPEC), all with
// a guess of 1 (an OR-cut, or a SPEC with carry in 1 for the one SPEC configuration),
// ADD_first taking the upper half of the spare bits).
//
// All adders see the same operands: N_SAMPLES pairs from a log-uniform distribution
// (a random word shifted right by a random amount, which reaches the small sums that
// make the worst cases) and N_SAMPLES uniform pairs.  For each configuration the test
// checks every result against the bit-serial reference model, checks that the
// relative error never exceeds the analytic bound, and reports the measured maximum
// relative error (RE_MAX, both distributions) and RMS relative error (RE_RMS, uniform
// only) next to the bound.  Each configuration must err at least once.
module tb_ccb_workloads;
  import ccb_ref_pkg::*;

  localparam int N_SAMPLES = 300000;  // per distribution
  localparam int N_CFG     = 30;

  // Quintuples (n_cut, add1, prop, add3, spec), one 8-bit field each; the first 15
  // are the 0.8 GHz set, the rest the 3.3 GHz set.  ADD_first = ceil(spare / 2).
  function automatic int q(int i, int f);
    logic [39:0] t;
    case (i)
       0: t = {8'd4, 8'd4, 8'd1, 8'd0, 8'd0};
       1: t = {8'd3, 8'd5, 8'd1, 8'd0, 8'd0};
       2: t = {8'd4, 8'd4, 8'd2, 8'd0, 8'd0};
       3: t = {8'd3, 8'd3, 8'd3, 8'd0, 8'd0};
       4: t = {8'd2, 8'd5, 8'd2, 8'd2, 8'd0};
       5: t = {8'd2, 8'd7, 8'd1, 8'd0, 8'd0};
       6: t = {8'd2, 8'd8, 8'd1, 8'd0, 8'd0};
       7: t = {8'd2, 8'd7, 8'd2, 8'd0, 8'd0};
       8: t = {8'd2, 8'd6, 8'd3, 8'd0, 8'd0};
       9: t = {8'd1, 8'd9, 8'd1, 8'd0, 8'd0};
      10: t = {8'd1, 8'd10, 8'd1, 8'd0, 8'd0};
      11: t = {8'd1, 8'd10, 8'd2, 8'd0, 8'd0};
      12: t = {8'd1, 8'd9, 8'd4, 8'd0, 8'd0};
      13: t = {8'd1, 8'd11, 8'd3, 8'd0, 8'd0};
      14: t = {8'd1, 8'd12, 8'd3, 8'd0, 8'd1};
      15: t = {8'd10, 8'd1, 8'd1, 8'd1, 8'd0};
      16: t = {8'd10, 8'd1, 8'd1, 8'd0, 8'd0};
      17: t = {8'd7, 8'd1, 8'd1, 8'd2, 8'd0};
      18: t = {8'd6, 8'd1, 8'd1, 8'd2, 8'd0};
      19: t = {8'd6, 8'd2, 8'd1, 8'd1, 8'd0};
      20: t = {8'd8, 8'd1, 8'd2, 8'd0, 8'd0};
      21: t = {8'd7, 8'd1, 8'd2, 8'd0, 8'd0};
      22: t = {8'd7, 8'd3, 8'd1, 8'd0, 8'd0};
      23: t = {8'd3, 8'd3, 8'd1, 8'd2, 8'd0};
      24: t = {8'd4, 8'd2, 8'd2, 8'd2, 8'd0};
      25: t = {8'd3, 8'd4, 8'd1, 8'd2, 8'd0};
      26: t = {8'd4, 8'd3, 8'd2, 8'd2, 8'd0};
      27: t = {8'd2, 8'd5, 8'd1, 8'd3, 8'd0};
      28: t = {8'd2, 8'd4, 8'd2, 8'd2, 8'd0};
      29: t = {8'd1, 8'd2, 8'd4, 8'd0, 8'd0};
      default: t = '0;
    endcase
    return int'(t[8*(4-f) +: 8]);
  endfunction

  function automatic ccb_cfg_t cfg_of(int i);
    ccb_cfg_t c;
    int spare;
    c.width = 32; c.n_cut = q(i, 0); c.add1 = q(i, 1); c.prop = q(i, 2);
    c.add3 = q(i, 3); c.spec = q(i, 4); c.guess = 1'b1;
    spare = 32 - c.n_cut * (c.add1 + c.prop) - (c.n_cut - 1) * c.add3;
    c.first = (spare + 1) / 2;
    return c;
  endfunction

  int checks = 0, failures = 0;
  logic [31:0] a, b;
  logic [32:0] sums [N_CFG];

  for (genvar i = 0; i < N_CFG; i++) begin : g_dut
    localparam int SPARE = 32 - q(i, 0) * (q(i, 1) + q(i, 2)) - (q(i, 0) - 1) * q(i, 3);
    localparam int NC = q(i, 0);
    logic [NC-1:0] cut;
    ccb_adder #(.WIDTH(32), .N_CUT(q(i, 0)), .ADD1_W(q(i, 1)), .PROP_W(q(i, 2)),
                .ADD3_W(q(i, 3)), .SPEC_W(q(i, 4)), .GUESS(1'b1), .FIRST_W((SPARE + 1) / 2))
      dut (.a(a), .b(b), .sum(sums[i]), .cut(cut));
  end

  real re_max [N_CFG];
  real re_sq  [N_CFG];
  int  n_err  [N_CFG];
  int  n_uniform = 0;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(bit uniform);
    logic [64:0] exact = 65'(a) + 65'(b);
    #1;
    if (uniform) n_uniform++;
    for (int i = 0; i < N_CFG; i++) begin
      ccb_cfg_t c = cfg_of(i);
      real re;
      checks++;
      if (65'(sums[i]) !== ref_sum(c, 64'(a), 64'(b))) begin
        failures++;
        if (failures <= 20) $display("FAIL cfg %0d a=%h b=%h sum=%h", i, a, b, sums[i]);
      end
      if (exact != 0 && 65'(sums[i]) != exact) begin
        re = real'(65'(sums[i]) - exact) / real'(exact);
        n_err[i]++;
        if (re > re_max[i]) re_max[i] = re;
        if (uniform) re_sq[i] += re * re;
        checks++;
        if (re > re_bound(c) * (1.0 + 1e-9)) begin
          failures++;
          if (failures <= 20) $display("FAIL cfg %0d RE %f above bound, a=%h b=%h", i, re, a, b);
        end
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N_CFG; i++) begin re_max[i] = 0.0; re_sq[i] = 0.0; n_err[i] = 0; end
    for (int n = 0; n < N_SAMPLES; n++) begin
      a = $urandom >> ($urandom % 32);
      b = $urandom >> ($urandom % 32);
      measure(1'b0);
    end
    for (int n = 0; n < N_SAMPLES; n++) begin
      a = $urandom;
      b = $urandom;
      measure(1'b1);
    end
    $display("config (n,add1,prop,add3,spec) first  bound%%     RE_MAX%%   RE_RMS%%");
    for (int i = 0; i < N_CFG; i++) begin
      automatic ccb_cfg_t c = cfg_of(i);
      $display("  (%0d,%0d,%0d,%0d,%0d)  %0d  %9.5f  %9.5f  %9.6f", c.n_cut, c.add1, c.prop,
               c.add3, c.spec, c.first, 100.0 * re_bound(c), 100.0 * re_max[i],
               100.0 * $sqrt(re_sq[i] / n_uniform));
      checks++;
      if (n_err[i] == 0) begin failures++; if (failures <= 20) $display("FAIL cfg %0d never erred", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
