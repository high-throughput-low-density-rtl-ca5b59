// tb_cmp4: random and corner-case check of CMP-4 against a sort of the inputs.
module tb_cmp4;
  logic [4:0] v [4];
  logic [4:0] mn, sc;
  int checks = 0, failures = 0;
  cmp4 #(.W(5)) dut (.a(v[0]), .b(v[1]), .c(v[2]), .d(v[3]), .min(mn), .sec(sc));
  initial begin
    for (int n = 0; n < 5000; n++) begin
      int s [4];
      for (int i = 0; i < 4; i++) begin
        // small range now and then to force ties
        s[i] = (n % 3 == 0) ? int'($urandom_range(0, 3)) : int'($urandom_range(0, 31));
        v[i] = 5'(s[i]);
      end
      s.sort();
      #1;
      checks++;
      if (int'(mn) != s[0] || int'(sc) != s[1]) begin
        failures++;
        if (failures < 5) $display("FAIL %0d %0d %0d %0d -> %0d %0d", v[0], v[1], v[2], v[3], mn, sc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
