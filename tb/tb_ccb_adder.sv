// tb_ccb_adder: end-to-end test of the CCB adder at its default configuration
// (32 bits, four OR-cut modules, ADD1 = 4, PROP = 2, no ADD3, no SPEC).
//
// Every result is compared with a bit-serial reference model (ccb_ref_pkg) and with
// the exact sum.  Checked on every addition: sum and cut flags equal the model; an
// error only appears when some cut flag is up; the error is positive (OR-cut guesses
// 1) and made only of bits at cut positions (each error weighs 2^m); the relative
// error stays within the worst-case bound 1/(2^4 * 3).  Directed cases reach the bound
// exactly.  Operands come from a uniform and a log-uniform distribution, the two
// used to characterise approximate adders; RE_MAX and RE_RMS are reported.
// Mechanisms counted (each must happen): a cut that is harmless, a cut that causes an
// error, two modules cutting at once, an addition with no cut at all, a carry out.
module tb_ccb_adder;
  import ccb_ref_pkg::*;

  localparam int N_RANDOM = 5000000;  // per distribution, as in the characterisation

  localparam ccb_cfg_t CFG = '{width: 32, n_cut: 4, add1: 4, prop: 2, add3: 0, spec: 0,
                               guess: 1'b1, first: 4};

  int checks = 0, failures = 0;
  logic [31:0] a, b;
  logic [32:0] sum;
  logic [3:0]  cut;

  int  n_cut_ok = 0, n_cut_err = 0, n_multi_cut = 0, n_no_cut = 0, n_cout = 0;
  real re_max = 0.0, re_sq = 0.0;  // re_sq and n_nonzero: uniform operands only
  int  n_nonzero = 0;
  bit  uniform_phase = 1'b0;

  ccb_adder dut (.a(a), .b(b), .sum(sum), .cut(cut));

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [31:0] x, logic [31:0] y);
    logic [64:0] want, exact, err;
    logic [63:0] want_cut;
    real re;
    a = x; b = y;
    #1;
    want     = ref_sum(CFG, 64'(x), 64'(y));
    want_cut = ref_cuts(CFG, 64'(x), 64'(y));
    exact    = 65'(x) + 65'(y);
    checks++;
    if (65'(sum) !== want || 64'(cut) !== want_cut) begin
      failures++;
      if (failures <= 20) $display("FAIL a=%h b=%h sum=%h want=%h cut=%b want_cut=%b", x, y, sum, want, cut,
               want_cut[3:0]);
    end
    err = 65'(sum) - exact;
    checks++;
    if (cut == 0 && err != 0) begin
      failures++; if (failures <= 20) $display("FAIL error without cut a=%h b=%h", x, y);
    end
    checks++;
    if (65'(sum) < exact || (err & ~cut_mask(CFG)) != 0) begin
      failures++; if (failures <= 20) $display("FAIL error shape a=%h b=%h err=%h", x, y, err);
    end
    if (exact != 0) begin
      re = real'(err) / real'(exact);
      if (uniform_phase) begin
        n_nonzero++;
        re_sq += re * re;
      end
      if (re > re_max) re_max = re;
      checks++;
      if (re > re_bound(CFG) * (1.0 + 1e-9)) begin
        failures++; if (failures <= 20) $display("FAIL RE %f above bound a=%h b=%h", re, x, y);
      end
    end
    if (cut != 0 && err == 0) n_cut_ok++;
    if (err != 0) n_cut_err++;
    if ($countones(cut) > 1) n_multi_cut++;
    if (cut == 0) n_no_cut++;
    if (sum[32]) n_cout++;
  endtask

  function automatic logic [31:0] log_uniform();
    return $urandom >> ($urandom % 32);
  endfunction

  initial begin
    real bound = re_bound(CFG);
    // Directed: worst case of the first module (PROP bits 9:8 propagate, no real carry).
    apply(32'h0000_0300, 32'h0);
    checks++;
    if (sum !== 33'h310) begin failures++; if (failures <= 20) $display("FAIL worst case sum=%h", sum); end
    // The same pattern one module up, and an error-free cut (real carry already 1).
    apply(32'h0000_C000, 32'h0);
    apply(32'h0000_030F, 32'h0000_0001);
    // All ones plus one: every module cuts, a carry leaves the top.
    apply(32'hFFFF_FFFF, 32'h0000_0001);
    apply(32'h5555_5555, 32'hAAAA_AAAA);
    uniform_phase = 1'b1;
    for (int i = 0; i < N_RANDOM; i++) apply($urandom, $urandom);
    uniform_phase = 1'b0;
    for (int i = 0; i < N_RANDOM; i++) apply(log_uniform(), log_uniform());

    $display("RE bound %f %%, measured RE_MAX %f %%, RE_RMS (uniform) %f %%", 100.0 * bound,
             100.0 * re_max, 100.0 * $sqrt(re_sq / n_nonzero));
    $display("mechanisms: harmless cut %0d, erroneous cut %0d, multiple cuts %0d, no cut %0d, carry out %0d",
             n_cut_ok, n_cut_err, n_multi_cut, n_no_cut, n_cout);
    checks++;
    if (re_max < bound * (1.0 - 1e-9)) begin
      failures++; if (failures <= 20) $display("FAIL worst case never reached");
    end
    checks += 5;
    if (n_cut_ok == 0)    begin failures++; if (failures <= 20) $display("FAIL no harmless cut"); end
    if (n_cut_err == 0)   begin failures++; if (failures <= 20) $display("FAIL no erroneous cut"); end
    if (n_multi_cut == 0) begin failures++; if (failures <= 20) $display("FAIL no multiple cut"); end
    if (n_no_cut == 0)    begin failures++; if (failures <= 20) $display("FAIL no addition without cut"); end
    if (n_cout == 0)      begin failures++; if (failures <= 20) $display("FAIL no carry out"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
