// tb_ccb_prop: exhaustive check of the PROP detector for a 2-bit and a 3-bit slice.
// cut must be 1 exactly when every bit pair differs (every bit propagates).
module tb_ccb_prop;
  int checks = 0, failures = 0;
  logic [1:0] a2, b2;
  logic [2:0] a3, b3;
  logic       cut2, cut3;

  ccb_prop dut2 (.a(a2), .b(b2), .cut(cut2));
  ccb_prop #(.PROP_W(3)) dut3 (.a(a3), .b(b3), .cut(cut3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      {a3, b3} = 6'(i);
      a2 = a3[1:0];
      b2 = b3[1:0];
      #1;
      checks += 2;
      if (cut2 !== ((a2[0] != b2[0]) && (a2[1] != b2[1]))) begin
        failures++; if (failures <= 20) $display("FAIL prop2 a=%b b=%b cut=%b", a2, b2, cut2);
      end
      if (cut3 !== ((a3[0] != b3[0]) && (a3[1] != b3[1]) && (a3[2] != b3[2]))) begin
        failures++; if (failures <= 20) $display("FAIL prop3 a=%b b=%b cut=%b", a3, b3, cut3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
