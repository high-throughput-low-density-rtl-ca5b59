// tb_cnu14: random check of the pipelined Code I check node unit; each input
// vector's result is expected one clock later.
module tb_cnu14;
  import ldpc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  msg_t in [14], out [14], expv [14];
  logic [13:0] used;
  int checks = 0, failures = 0;
  cnu14 #(.DEG(14)) dut (.clk(clk), .msg_in(in), .used(used), .msg_out(out));
  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int p = 0; p < 14; p++) in[p] = msg_t'($urandom);
      if (n % 5 == 0) for (int p = 0; p < 14; p++) in[p][4:2] = 3'b000;
      used = (n % 2) ? 14'h3fff : 14'h07ff;   // rows of weight 14 and 11
      for (int p = 0; p < 14; p++) begin
        automatic int mn = 31; automatic bit sg = 0;
        for (int o = 0; o < 14; o++)
          if (o != p && used[o]) begin
            if (int'(in[o][4:0]) < mn) mn = int'(in[o][4:0]);
            sg ^= in[o][5];
          end
        expv[p] = used[p] ? {sg, 5'(mn)} : '0;
      end
      @(posedge clk); #1;
      for (int p = 0; p < 14; p++) begin
        checks++;
        if (out[p] != expv[p]) begin
          failures++;
          if (failures < 5) $display("FAIL n=%0d p=%0d got %h exp %h", n, p, out[p], expv[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
