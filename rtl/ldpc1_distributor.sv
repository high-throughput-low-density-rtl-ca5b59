// ldpc1_distributor: channel-value store of the Code I decoder.
//
// Holds the 600 channel values of one codeword. Values are shifted in
// IN_LANES per clock while `shift` is high (the first value ends at column
// 0). The active bit-node set `set` (0..3) receives its 150 values
// (columns 150*set .. 150*set+149) on dout; only the bit node units are
// connected to the channel values. Combinational read, registered write.
// The block's role follows the decoder description; the serial fill and the
// set selection are this design's own.
module ldpc1_distributor
  import ldpc_pkg::*;
#(
  parameter int N        = 600,
  parameter int NSET     = 4,
  parameter int IN_LANES = 1
) (
  input  logic clk,
  input  logic shift,
  input  ch_t  din [IN_LANES],
  input  logic [$clog2(NSET)-1:0] set,
  output ch_t  dout [N/NSET]
);
  localparam int W = N / NSET;
  ch_t mem [N];

  always_ff @(posedge clk) begin
    if (shift) begin
      for (int n = 0; n < N - IN_LANES; n++) mem[n] <= mem[n + IN_LANES];
      for (int l = 0; l < IN_LANES; l++) mem[N - IN_LANES + l] <= din[l];
    end
  end

  always_comb begin
    for (int j = 0; j < W; j++) dout[j] = mem[W * set + j];
  end
endmodule
