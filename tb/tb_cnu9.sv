// tb_cnu9: random check of the Code II check node unit. The expected output of
// each used port is computed directly as the XOR of the other used ports'
// signs and the minimum of their magnitudes.
module tb_cnu9;
  import ldpc_pkg::*;
  msg_t in [9], out [9];
  logic [8:0] used;
  int checks = 0, failures = 0;
  cnu9 #(.DEG(9)) dut (.msg_in(in), .used(used), .msg_out(out));
  initial begin
    for (int n = 0; n < 4000; n++) begin
      for (int p = 0; p < 9; p++) in[p] = msg_t'($urandom);
      if (n % 5 == 0) for (int p = 0; p < 9; p++) in[p][4:3] = 2'b00;  // ties
      used = 9'h1ff;
      if (n % 3 == 1) used[8] = 1'b0;
      if (n % 3 == 2) used[8:7] = 2'b00;
      #1;
      for (int p = 0; p < 9; p++) begin
        msg_t e;
        automatic int mn = 31; automatic bit sg = 0;
        for (int o = 0; o < 9; o++)
          if (o != p && used[o]) begin
            if (int'(in[o][4:0]) < mn) mn = int'(in[o][4:0]);
            sg ^= in[o][5];
          end
        e = used[p] ? {sg, 5'(mn)} : '0;
        checks++;
        if (out[p] != e) begin
          failures++;
          if (failures < 5) $display("FAIL n=%0d p=%0d got %h exp %h", n, p, out[p], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
