// tb_ldpc1_distributor: shifts a full 600-value codeword in (one and two
// lanes) and checks that each of the four set windows shows the 150 channel
// values of its column set, in column order.
module tb_ldpc1_distributor;
  import ldpc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic shift = 0, shift2 = 0;
  logic [1:0] set;
  ch_t din [1], din2 [2], dout [150], dout2 [150];
  ch_t ref_v [600];
  int checks = 0, failures = 0;
  ldpc1_distributor #(.N(600), .NSET(4), .IN_LANES(1)) dut  (.clk(clk), .shift(shift),  .din(din),  .set(set), .dout(dout));
  ldpc1_distributor #(.N(600), .NSET(4), .IN_LANES(2)) dut2 (.clk(clk), .shift(shift2), .din(din2), .set(set), .dout(dout2));
  initial begin
    for (int w = 0; w < 2; w++) begin
      for (int c = 0; c < 600; c++) ref_v[c] = ch_t'($urandom);
      for (int c = 0; c < 600; c++) begin
        shift = 1; din[0] = ref_v[c];
        if (c % 2 == 0) begin shift2 = 1; din2[0] = ref_v[c]; din2[1] = ref_v[c + 1]; end
        else shift2 = 0;
        @(posedge clk); #1;
      end
      shift = 0; shift2 = 0;
      for (int s = 0; s < 4; s++) begin
        set = 2'(s); #1;
        for (int j = 0; j < 150; j++) begin
          checks += 2;
          if (dout[j]  != ref_v[150 * s + j]) failures++;
          if (dout2[j] != ref_v[150 * s + j]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
