// tb_cmp2: exhaustive check of the two-input compare unit over all 5-bit pairs.
module tb_cmp2;
  logic [4:0] a, b, mn, sc;
  int checks = 0, failures = 0;
  cmp2 #(.W(5)) dut (.a(a), .b(b), .min(mn), .sec(sc));
  initial begin
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++) begin
        a = 5'(x); b = 5'(y); #1;
        checks++;
        if (int'(mn) != ((x < y) ? x : y) || int'(sc) != ((x < y) ? y : x)) begin
          failures++;
          if (failures < 5) $display("FAIL a=%0d b=%0d min=%0d sec=%0d", x, y, mn, sc);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
