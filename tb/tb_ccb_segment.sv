// tb_ccb_segment: checks sum and carry out of 1-, 4- and 10-bit segments: exhaustive
// for the small ones, random for the 10-bit one, against integer addition.
module tb_ccb_segment;
  int checks = 0, failures = 0;
  logic [9:0]  a, b;
  logic        cin;
  logic [0:0]  s1;
  logic [3:0]  s4;
  logic [9:0]  s10;
  logic        co1, co4, co10;

  ccb_segment #(.W(1))  d1  (.a(a[0:0]), .b(b[0:0]), .cin(cin), .sum(s1),  .cout(co1));
  ccb_segment           d4  (.a(a[3:0]), .b(b[3:0]), .cin(cin), .sum(s4),  .cout(co4));
  ccb_segment #(.W(10)) d10 (.a(a),      .b(b),      .cin(cin), .sum(s10), .cout(co10));

  task automatic check_all();
    int e1, e4, e10;
    e1  = int'(a[0])   + int'(b[0])   + int'(cin);
    e4  = int'(a[3:0]) + int'(b[3:0]) + int'(cin);
    e10 = int'(a)      + int'(b)      + int'(cin);
    checks += 3;
    if ({co1, s1} !== 2'(e1))    begin failures++; if (failures <= 20) $display("FAIL w1 a=%h b=%h", a, b); end
    if ({co4, s4} !== 5'(e4))    begin failures++; if (failures <= 20) $display("FAIL w4 a=%h b=%h", a, b); end
    if ({co10, s10} !== 11'(e10)) begin failures++; if (failures <= 20) $display("FAIL w10 a=%h b=%h", a, b); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      // low nibbles exhaustive; upper bits follow them so the 10-bit adder varies too
      a   = {i[1:0], i[7:4], i[3:0]};
      b   = {i[3:2], i[3:0], i[7:4]};
      cin = i[8];
      #1 check_all();
    end
    for (int i = 0; i < 2000; i++) begin
      a = 10'($urandom); b = 10'($urandom); cin = 1'($urandom);
      if (i == 0) begin a = '1; b = '0; cin = 1'b1; end  // full-length carry ripple
      #1 check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
