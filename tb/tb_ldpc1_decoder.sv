// tb_ldpc1_decoder: end-to-end check of the Code I (600,450) decoder against
// the bit-true min-sum model in ldpc_ref_pkg. Five codewords are streamed in
// back to back (in_valid held high, the decoder applies backpressure with
// in_ready): uniformly random channel values, and the all-zero codeword with
// light, moderate and heavy Gaussian-like noise. For each codeword the test
// checks
//   - all 600 hard decisions equal the model after 8 iterations,
//   - the four 150-bit output blocks arrive in set order 0,1,2,3 in
//     consecutive clocks,
//   - the decoder is busy for exactly 77 clocks (5 load + 8 x 9),
//   - the run starts the clock after the 600th value is accepted.
module tb_ldpc1_decoder;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, busy;
  ch_t  in_llr [1];
  logic [1:0] out_set;
  logic [149:0] out_bits;
  int checks = 0, failures = 0;
  localparam int NCW = 5;

  ldpc1_decoder #(.IN_LANES(1), .ITER(8)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_llr(in_llr),
    .out_valid(out_valid), .out_set(out_set), .out_bits(out_bits), .busy(busy));

  int chv [NCW][600];
  int rows[];
  int corrected = 0;

  function automatic int noisy(input int mean, input int spread);
    int v = mean;
    for (int i = 0; i < 4; i++) v += $urandom_range(0, 2 * spread) - spread;
    return (v > 15) ? 15 : (v < -15) ? -15 : v;
  endfunction

  // stimulus
  initial begin
    for (int w = 0; w < NCW; w++)
      for (int c = 0; c < 600; c++)
        chv[w][c] = (w == 0) ? int'($urandom_range(0, 30)) - 15 :
                    (w == 1) ? noisy(6, 2) : (w == 2) ? noisy(4, 3) : noisy(3, 4);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int w = 0; w < NCW; w++)
      for (int c = 0; c < 600; c++) begin
        in_valid = 1; in_llr[0] = int2ch(chv[w][c]);
        while (!in_ready) begin @(posedge clk); #1; end
        @(posedge clk); #1;                 // value taken at this edge
      end
    in_valid = 0;
  end

  // output / timing checker
  initial begin
    c1_rows(rows);
    @(posedge rst_n);
    #1;                                    // sample 2 time units after each edge
    for (int w = 0; w < NCW; w++) begin
      int ch[]; bit dec[];
      automatic int busy_len = 0;
      ch = new[600];
      for (int c = 0; c < 600; c++) ch[c] = chv[w][c];
      minsum(600, 150, rows, ch, 8, dec);
      // wait for the last value of this codeword to be accepted
      begin
        automatic int acc = 0;
        while (acc < 600) begin
          if (in_valid && in_ready) acc++;  // accepted at the coming edge
          @(posedge clk); #2;
        end
      end
      checks++;
      if (!busy) begin failures++; $display("FAIL cw%0d: run did not start after the last value", w); end
      for (int s = 0; s < 4; ) begin
        if (busy) busy_len++;
        if (out_valid) begin
          checks++;
          if (out_set != 2'(s)) begin failures++; $display("FAIL cw%0d: set %0d expected %0d", w, out_set, s); end
          for (int j = 0; j < 150; j++) begin
            checks++;
            if (out_bits[j] != dec[150 * s + j]) begin failures++; if (failures < 6) $display("FAIL cw%0d bit %0d", w, 150 * s + j); end
            if (dec[150 * s + j] != (ch[150 * s + j] < 0)) corrected++;
          end
          s++;
        end else if (s > 0) begin failures++; $display("FAIL cw%0d: output blocks not consecutive", w); s = 4; end
        @(posedge clk); #2;
      end
      while (busy) begin busy_len++; @(posedge clk); #2; end
      checks++;
      if (busy_len != 77) begin failures++; $display("FAIL cw%0d: busy %0d clocks, expected 77", w, busy_len); end
    end
    // the decoder must actually have changed some hard decisions
    checks++;
    if (corrected == 0) begin failures++; $display("FAIL: no hard decision was ever changed by decoding"); end
    $display("tb_ldpc1_decoder: %0d hard decisions changed by decoding", corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
