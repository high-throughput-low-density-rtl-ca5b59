// ldpc_top: the two LDPC decoders side by side.
//
//   - ldpc2_decoder: (1200,720) code, two codewords decoded concurrently,
//     8 iterations in 36 clocks per pair (the high-throughput design);
//   - ldpc1_decoder: (600,450) code for an MB-OFDM UWB receiver, 8 iterations
//     in 77 clocks per codeword.
//
// The decoders share nothing but the clock and reset; each has its own
// channel-value input handshake and decoded-bit output, brought out with a
// c2_ or c1_ prefix. See the two decoders for formats and timing.
module ldpc_top
  import ldpc_pkg::*;
#(
  parameter int C2_IN_LANES = 1,
  parameter int C1_IN_LANES = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  // Code II decoder
  input  logic         c2_in_valid,
  output logic         c2_in_ready,
  input  ch_t          c2_in_llr [C2_IN_LANES],
  output logic         c2_out_valid,
  output logic         c2_out_cw,
  output logic         c2_out_half,
  output logic [599:0] c2_out_bits,
  output logic         c2_busy,
  // Code I decoder
  input  logic         c1_in_valid,
  output logic         c1_in_ready,
  input  ch_t          c1_in_llr [C1_IN_LANES],
  output logic         c1_out_valid,
  output logic [1:0]   c1_out_set,
  output logic [149:0] c1_out_bits,
  output logic         c1_busy
);
  ldpc2_decoder #(.IN_LANES(C2_IN_LANES)) u_code2 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(c2_in_valid), .in_ready(c2_in_ready), .in_llr(c2_in_llr),
    .out_valid(c2_out_valid), .out_cw(c2_out_cw), .out_half(c2_out_half),
    .out_bits(c2_out_bits), .busy(c2_busy));

  ldpc1_decoder #(.IN_LANES(C1_IN_LANES)) u_code1 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(c1_in_valid), .in_ready(c1_in_ready), .in_llr(c1_in_llr),
    .out_valid(c1_out_valid), .out_set(c1_out_set), .out_bits(c1_out_bits),
    .busy(c1_busy));
endmodule
