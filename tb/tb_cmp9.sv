// tb_cmp9: random check of the nine-input min / second-min search.
module tb_cmp9;
  logic [4:0] m [9];
  logic [4:0] mn, sc;
  int checks = 0, failures = 0;
  cmp9 #(.W(5)) dut (.m(m), .min(mn), .sec(sc));
  initial begin
    for (int n = 0; n < 5000; n++) begin
      int s [9];
      for (int i = 0; i < 9; i++) begin
        s[i] = (n % 4 == 0) ? int'($urandom_range(0, 4)) : int'($urandom_range(0, 31));
        m[i] = 5'(s[i]);
      end
      s.sort();
      #1;
      checks++;
      if (int'(mn) != s[0] || int'(sc) != s[1]) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d -> %0d %0d expected %0d %0d", n, mn, sc, s[0], s[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
