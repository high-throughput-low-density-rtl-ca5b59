// tb_cmp14: streams random 14-input vectors into the pipelined CMP-14 and
// checks each result one clock later (latency 1).
module tb_cmp14;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [4:0] m [14];
  logic [4:0] mn, sc;
  int checks = 0, failures = 0;
  int exp_min = -1, exp_sec = -1;
  cmp14 #(.W(5)) dut (.clk(clk), .m(m), .min(mn), .sec(sc));
  initial begin
    for (int n = 0; n < 3000; n++) begin
      int s [14];
      for (int i = 0; i < 14; i++) begin
        s[i] = (n % 4 == 0) ? int'($urandom_range(0, 5)) : int'($urandom_range(0, 31));
        m[i] = 5'(s[i]);
      end
      s.sort();
      @(posedge clk); #1;
      // the vector applied before this edge is now at the output
      checks++;
      if (int'(mn) != s[0] || int'(sc) != s[1]) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d -> %0d %0d expected %0d %0d", n, mn, sc, s[0], s[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
