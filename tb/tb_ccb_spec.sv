// tb_ccb_spec: exhaustive check of the SPEC carry speculator, 1, 2 and 3 bits wide,
// with both guesses.  Expected carry: the carry out of (a + b + guess) over the slice.
module tb_ccb_spec;
  int checks = 0, failures = 0;
  logic [2:0] a, b;
  logic       c1g0, c1g1, c2g0, c2g1, c3g0, c3g1;

  ccb_spec #(.SPEC_W(1), .GUESS(1'b0)) d1g0 (.a(a[0:0]), .b(b[0:0]), .carry(c1g0));
  ccb_spec #(.SPEC_W(1), .GUESS(1'b1)) d1g1 (.a(a[0:0]), .b(b[0:0]), .carry(c1g1));
  ccb_spec #(.SPEC_W(2), .GUESS(1'b0)) d2g0 (.a(a[1:0]), .b(b[1:0]), .carry(c2g0));
  ccb_spec #(.SPEC_W(2), .GUESS(1'b1)) d2g1 (.a(a[1:0]), .b(b[1:0]), .carry(c2g1));
  ccb_spec #(.SPEC_W(3), .GUESS(1'b0)) d3g0 (.a(a), .b(b), .carry(c3g0));
  ccb_spec #(.SPEC_W(3), .GUESS(1'b1)) d3g1 (.a(a), .b(b), .carry(c3g1));

  task automatic expect_bit(string what, logic got, logic want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures <= 20) $display("FAIL %s a=%b b=%b got=%b want=%b", what, a, b, got, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      {a, b} = 6'(i);
      #1;
      expect_bit("w1g0", c1g0, 1'((32'(a[0])   + 32'(b[0])   + 0) >> 1));
      expect_bit("w1g1", c1g1, 1'((32'(a[0])   + 32'(b[0])   + 1) >> 1));
      expect_bit("w2g0", c2g0, 1'((32'(a[1:0]) + 32'(b[1:0]) + 0) >> 2));
      expect_bit("w2g1", c2g1, 1'((32'(a[1:0]) + 32'(b[1:0]) + 1) >> 2));
      expect_bit("w3g0", c3g0, 1'((32'(a)      + 32'(b)      + 0) >> 3));
      expect_bit("w3g1", c3g1, 1'((32'(a)      + 32'(b)      + 1) >> 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
