// tb_rs_input_buffer: fills the four-block ring with tagged values in the
// same fill / rotate order the Code II decoder uses, then checks that
// rotation presents the blocks at the output in order and wraps around.
// Runs with a short depth and with two input lanes.
module tb_rs_input_buffer;
  import ldpc_pkg::*;
  localparam int D = 12;
  logic clk = 0;
  always #5 clk = ~clk;
  logic shift = 0, rotate = 0, shift2 = 0, rotate2 = 0;
  ch_t din [1], din2 [2], dout [D], dout2 [D];
  int checks = 0, failures = 0;
  rs_input_buffer #(.DEPTH(D), .IN_LANES(1)) dut  (.clk(clk), .shift(shift),  .din(din),  .rotate(rotate),  .dout(dout));
  rs_input_buffer #(.DEPTH(D), .IN_LANES(2)) dut2 (.clk(clk), .shift(shift2), .din(din2), .rotate(rotate2), .dout(dout2));

  function automatic ch_t val(input int blk, input int n); return ch_t'(blk * 8 + n % 8 + ((n >= 8) ? 5 : 0)); endfunction

  initial begin
    for (int blk = 0; blk < 4; blk++) begin
      for (int n = 0; n < D; n++) begin
        shift = 1; din[0] = val(blk, n);
        if (n % 2 == 0) begin shift2 = 1; din2[0] = val(blk, n); din2[1] = val(blk, n + 1); end
        else shift2 = 0;
        @(posedge clk); #1;
      end
      shift = 0; shift2 = 0;
      if (blk < 3) begin rotate = 1; rotate2 = 1; @(posedge clk); #1; rotate = 0; rotate2 = 0; end
    end
    // ring now: buf0 = block 3, buf1 = 2, buf2 = 1, buf3 = 0
    for (int r = 0; r < 9; r++) begin
      automatic int blk = r % 4;                   // block at the output
      for (int n = 0; n < D; n++) begin
        checks += 2;
        if (dout[n]  != val(blk, n)) begin failures++; if (failures < 5) $display("FAIL r=%0d n=%0d %h", r, n, dout[n]); end
        if (dout2[n] != val(blk, n)) begin failures++; if (failures < 5) $display("FAIL2 r=%0d n=%0d %h", r, n, dout2[n]); end
      end
      rotate = 1; rotate2 = 1; @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
