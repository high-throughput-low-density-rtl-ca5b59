// tb_ldpc2_decoder: end-to-end check of the Code II (1200,720) decoder that
// decodes two codewords at once, against the bit-true min-sum model in
// ldpc_ref_pkg. Three codeword pairs are streamed in back to back (in_valid
// held high, the decoder applies backpressure with in_ready): uniformly
// random channel values, and the all-zero codeword with light to heavy
// Gaussian-like noise. For each pair the test checks
//   - all 2 x 1200 hard decisions equal the model after 8 iterations,
//   - the four 600-bit output blocks arrive in consecutive clocks in the
//     order (codeword 0, half 0), (0, 1), (1, 0), (1, 1),
//   - the decoder is busy for exactly 36 clocks per pair,
//   - the run starts the clock after the 2400th value is accepted.
module tb_ldpc2_decoder;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, busy, out_cw, out_half;
  ch_t  in_llr [1];
  logic [599:0] out_bits;
  int checks = 0, failures = 0;
  localparam int NPAIR = 3;

  ldpc2_decoder #(.IN_LANES(1), .ITER(8)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_llr(in_llr),
    .out_valid(out_valid), .out_cw(out_cw), .out_half(out_half), .out_bits(out_bits), .busy(busy));

  int chv [2 * NPAIR][1200];
  int rows[];
  int corrected = 0;

  function automatic int noisy(input int mean, input int spread);
    int v = mean;
    for (int i = 0; i < 4; i++) v += $urandom_range(0, 2 * spread) - spread;
    return (v > 15) ? 15 : (v < -15) ? -15 : v;
  endfunction

  initial begin
    for (int w = 0; w < 2 * NPAIR; w++)
      for (int c = 0; c < 1200; c++)
        chv[w][c] = (w < 2) ? int'($urandom_range(0, 30)) - 15 :
                    (w < 4) ? noisy(5, 3) : noisy(3, 4);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int w = 0; w < 2 * NPAIR; w++)
      for (int c = 0; c < 1200; c++) begin
        in_valid = 1; in_llr[0] = int2ch(chv[w][c]);
        while (!in_ready) begin @(posedge clk); #1; end
        @(posedge clk); #1;                 // value taken at this edge
      end
    in_valid = 0;
  end

  initial begin
    c2_rows(rows);
    @(posedge rst_n);
    #1;                                    // sample 2 time units after each edge
    for (int pr = 0; pr < NPAIR; pr++) begin
      bit dec [2][];
      automatic int busy_len = 0;
      automatic int acc = 0;
      for (int q = 0; q < 2; q++) begin
        int ch[]; bit d[];
        ch = new[1200];
        for (int c = 0; c < 1200; c++) ch[c] = chv[2 * pr + q][c];
        minsum(1200, 480, rows, ch, 8, d);
        dec[q] = d;
      end
      while (acc < 2400) begin
        if (in_valid && in_ready) acc++;   // accepted at the coming edge
        @(posedge clk); #2;
      end
      checks++;
      if (!busy) begin failures++; $display("FAIL pair%0d: run did not start after the last value", pr); end
      for (int s = 0; s < 4; ) begin
        if (busy) busy_len++;
        if (out_valid) begin
          checks++;
          if (out_cw != s[1] || out_half != s[0]) begin
            failures++; $display("FAIL pair%0d: block cw=%0d half=%0d, expected %0d", pr, out_cw, out_half, s);
          end
          for (int j = 0; j < 600; j++) begin
            automatic int col = 600 * (s % 2) + j;
            automatic int q = s / 2;
            checks++;
            if (out_bits[j] != dec[q][col]) begin
              failures++;
              if (failures < 6) $display("FAIL pair%0d cw%0d bit %0d", pr, q, col);
            end
            if (dec[q][col] != (chv[2 * pr + q][col] < 0)) corrected++;
          end
          s++;
        end else if (s > 0) begin failures++; $display("FAIL pair%0d: output blocks not consecutive", pr); s = 4; end
        @(posedge clk); #2;
      end
      while (busy) begin busy_len++; @(posedge clk); #2; end
      checks++;
      if (busy_len != 36) begin failures++; $display("FAIL pair%0d: busy %0d clocks, expected 36", pr, busy_len); end
    end
    checks++;
    if (corrected == 0) begin failures++; $display("FAIL: no hard decision was ever changed by decoding"); end
    $display("tb_ldpc2_decoder: %0d hard decisions changed by decoding", corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
