// tb_ldpc_top: end-to-end test of ldpc_top at its default parameters, with
// both decoders running at the same time.
//
// Code II receives two codeword pairs and Code I three codewords, all
// streamed back to back with in_valid held high. Every hard decision is
// compared with the bit-true min-sum model in ldpc_ref_pkg (8 iterations).
// The test also counts how often each mechanism of the architecture was
// exercised. A mechanism that never happened counts as a failure:
//   c2 ring rotation    : RS input buffer rotates between block fills
//   c2 load bypass      : BNUs pass channel values with check messages forced to 0
//   c2 RE-5B exchange   : MMU second-phase clocks (sub-block B -> A handover)
//   c2 interleave       : a run delivers blocks of both codewords of a pair
//   c2 clocks per pair  : every run lasts 36 clocks
//   c1 load bypass      : the 4 loading vertical steps
//   c1 CNU pipeline     : a CNU set is read while the previous one is written
//   c1 BNU pipeline     : a BNU set is read while the previous one is written
//   c1 clocks per word  : every run lasts 77 clocks
//   backpressure        : in_ready low while in_valid is high
//   error correction    : decoding changed hard decisions of the channel
module tb_ldpc_top;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;

  logic c2_in_valid = 0, c2_in_ready, c2_out_valid, c2_out_cw, c2_out_half, c2_busy;
  ch_t  c2_in_llr [1];
  logic [599:0] c2_out_bits;
  logic c1_in_valid = 0, c1_in_ready, c1_out_valid, c1_busy;
  ch_t  c1_in_llr [1];
  logic [1:0] c1_out_set;
  logic [149:0] c1_out_bits;

  ldpc_top dut (
    .clk(clk), .rst_n(rst_n),
    .c2_in_valid(c2_in_valid), .c2_in_ready(c2_in_ready), .c2_in_llr(c2_in_llr),
    .c2_out_valid(c2_out_valid), .c2_out_cw(c2_out_cw), .c2_out_half(c2_out_half),
    .c2_out_bits(c2_out_bits), .c2_busy(c2_busy),
    .c1_in_valid(c1_in_valid), .c1_in_ready(c1_in_ready), .c1_in_llr(c1_in_llr),
    .c1_out_valid(c1_out_valid), .c1_out_set(c1_out_set), .c1_out_bits(c1_out_bits),
    .c1_busy(c1_busy));

  localparam int NPAIR = 2, NC1 = 3;
  int checks = 0, failures = 0;
  int c2v [2 * NPAIR][1200], c1v [NC1][600];
  bit c2d [2 * NPAIR][1200], c1d [NC1][600];
  int c2_blocks = 0, c1_blocks = 0;
  bit c2_done = 0, c1_done = 0;

  // mechanism counters
  int n_c2_rot = 0, n_c2_load = 0, n_c2_xchg = 0, n_c2_inter = 0, n_c2_runs_ok = 0;
  int n_c1_load = 0, n_c1_cpipe = 0, n_c1_bpipe = 0, n_c1_runs_ok = 0;
  int n_bp = 0, n_corr = 0;
  int c2_len = 0, c1_len = 0;
  bit c2_seen0 = 0;

  function automatic int noisy(input int mean, input int spread);
    int v = mean;
    for (int i = 0; i < 4; i++) v += $urandom_range(0, 2 * spread) - spread;
    return (v > 15) ? 15 : (v < -15) ? -15 : v;
  endfunction

  // ------------------------------------------------------------ stimulus
  initial begin
    int rows2[], rows1[];
    c2_rows(rows2); c1_rows(rows1);
    for (int w = 0; w < 2 * NPAIR; w++) begin
      int ch[]; bit d[];
      ch = new[1200];
      for (int c = 0; c < 1200; c++) begin
        c2v[w][c] = (w < 2) ? noisy(5, 3) : noisy(3, 4);
        ch[c] = c2v[w][c];
      end
      minsum(1200, 480, rows2, ch, 8, d);
      for (int c = 0; c < 1200; c++) c2d[w][c] = d[c];
    end
    for (int w = 0; w < NC1; w++) begin
      int ch[]; bit d[];
      ch = new[600];
      for (int c = 0; c < 600; c++) begin
        c1v[w][c] = (w == 0) ? int'($urandom_range(0, 30)) - 15 : noisy(4, 3);
        ch[c] = c1v[w][c];
      end
      minsum(600, 150, rows1, ch, 8, d);
      for (int c = 0; c < 600; c++) c1d[w][c] = d[c];
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
  end

  initial begin
    @(posedge rst_n);
    for (int w = 0; w < 2 * NPAIR; w++)
      for (int c = 0; c < 1200; c++) begin
        c2_in_valid = 1; c2_in_llr[0] = int2ch(c2v[w][c]);
        while (!c2_in_ready) begin @(posedge clk); #1; end
        @(posedge clk); #1;
      end
    c2_in_valid = 0;
  end

  initial begin
    @(posedge rst_n);
    for (int w = 0; w < NC1; w++)
      for (int c = 0; c < 600; c++) begin
        c1_in_valid = 1; c1_in_llr[0] = int2ch(c1v[w][c]);
        while (!c1_in_ready) begin @(posedge clk); #1; end
        @(posedge clk); #1;
      end
    c1_in_valid = 0;
  end

  // ------------------------------------------------------------ monitors
  always @(negedge clk) if (rst_n) begin
    // Code II outputs: blocks arrive in order cw0h0, cw0h1, cw1h0, cw1h1
    if (c2_out_valid) begin
      automatic int pr = c2_blocks / 4, s = c2_blocks % 4;
      automatic int q = 2 * pr + s / 2;
      checks++;
      if (c2_out_cw != s[1] || c2_out_half != s[0]) begin
        failures++; $display("FAIL c2 block order: cw=%0d half=%0d expected %0d", c2_out_cw, c2_out_half, s);
      end
      if (pr < NPAIR) begin
        for (int j = 0; j < 600; j++) begin
          automatic int col = 600 * (s % 2) + j;
          checks++;
          if (c2_out_bits[j] != c2d[q][col]) begin failures++; if (failures < 6) $display("FAIL c2 cw%0d bit %0d", q, col); end
          if (c2d[q][col] != (c2v[q][col] < 0)) n_corr++;
        end
      end
      if (!c2_out_cw) c2_seen0 = 1;
      else if (c2_seen0) begin n_c2_inter++; c2_seen0 = 0; end
      c2_blocks++;
      if (c2_blocks == 4 * NPAIR) c2_done = 1;
    end
    if (c1_out_valid) begin
      automatic int w = c1_blocks / 4, s = c1_blocks % 4;
      checks++;
      if (c1_out_set != 2'(s)) begin failures++; $display("FAIL c1 set order: %0d expected %0d", c1_out_set, s); end
      if (w < NC1) begin
        for (int j = 0; j < 150; j++) begin
          checks++;
          if (c1_out_bits[j] != c1d[w][150 * s + j]) begin failures++; if (failures < 6) $display("FAIL c1 cw%0d bit %0d", w, 150 * s + j); end
          if (c1d[w][150 * s + j] != (c1v[w][150 * s + j] < 0)) n_corr++;
        end
      end
      c1_blocks++;
      if (c1_blocks == 4 * NC1) c1_done = 1;
    end
    // run lengths
    if (c2_busy) c2_len++;
    else if (c2_len != 0) begin
      checks++;
      if (c2_len == 36) n_c2_runs_ok++; else begin failures++; $display("FAIL c2 run of %0d clocks", c2_len); end
      c2_len = 0;
    end
    if (c1_busy) c1_len++;
    else if (c1_len != 0) begin
      checks++;
      if (c1_len == 77) n_c1_runs_ok++; else begin failures++; $display("FAIL c1 run of %0d clocks", c1_len); end
      c1_len = 0;
    end
    // internal mechanisms
    if (dut.u_code2.rotate && !c2_busy) n_c2_rot++;
    if (c2_busy && dut.u_code2.load) n_c2_load++;
    if (c2_busy && dut.u_code2.phase) n_c2_xchg++;
    if (c1_busy && dut.u_code1.load) n_c1_load++;
    if (dut.u_code1.c_act && dut.u_code1.c_we) n_c1_cpipe++;
    if (dut.u_code1.b_act && dut.u_code1.b_we && !dut.u_code1.load) n_c1_bpipe++;
    if ((c2_in_valid && !c2_in_ready) || (c1_in_valid && !c1_in_ready)) n_bp++;
  end

  task automatic need(input string name, input int n);
    checks++;
    $display("  %-20s %0d", name, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never exercised: %s", name); end
  endtask

  initial begin
    wait (c2_done && c1_done);
    repeat (3) @(posedge clk);
    $display("mechanism counts:");
    need("c2 ring rotation", n_c2_rot);
    need("c2 load bypass", n_c2_load);
    need("c2 RE-5B exchange", n_c2_xchg);
    need("c2 interleave", n_c2_inter);
    need("c2 36-clock runs", n_c2_runs_ok);
    need("c1 load bypass", n_c1_load);
    need("c1 CNU pipeline", n_c1_cpipe);
    need("c1 BNU pipeline", n_c1_bpipe);
    need("c1 77-clock runs", n_c1_runs_ok);
    need("backpressure", n_bp);
    need("error correction", n_corr);
    checks++;
    if (n_c2_runs_ok != NPAIR || n_c1_runs_ok != NC1) begin
      failures++; $display("FAIL run count c2=%0d c1=%0d", n_c2_runs_ok, n_c1_runs_ok);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
