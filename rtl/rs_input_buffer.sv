// rs_input_buffer: channel-value buffer built on register shifting (RS) for
// the Code II decoder, holding two codewords (4 x DEPTH values).
//
// Four sub-blocks form a ring buf0 -> buf1 -> buf2 -> buf3 -> buf0. buf0 is a
// shift register that takes IN_LANES channel values per clock when `shift`
// is high; the first value shifted in ends at index 0. A `rotate` clock moves
// every sub-block one step round the ring. Only buf3 drives the bit node
// units, so no multiplexer sits between buffer and datapath.
//
// Loading two codewords: fill buf0, rotate, fill, rotate, fill, rotate, fill.
// buf3 then holds block 0 (codeword 0, column half 0), buf2 block 1, buf1
// block 2 and buf0 block 3; rotating once per clock afterwards presents
// blocks 0, 1, 2, 3, 0, ... at buf3, which is the order the bit node units
// use them in. `rotate` has priority over `shift`.
//
// The ring and its direction follow the decoder description; the lane width
// and the load sequence are this design's own.
module rs_input_buffer
  import ldpc_pkg::*;
#(
  parameter int DEPTH    = 600,
  parameter int IN_LANES = 1
) (
  input  logic clk,
  input  logic shift,
  input  ch_t  din [IN_LANES],
  input  logic rotate,
  output ch_t  dout [DEPTH]
);
  ch_t buf0 [DEPTH], buf1 [DEPTH], buf2 [DEPTH], buf3 [DEPTH];

  always_ff @(posedge clk) begin
    if (rotate) begin
      buf1 <= buf0;
      buf2 <= buf1;
      buf3 <= buf2;
      buf0 <= buf3;
    end else if (shift) begin
      for (int n = 0; n < DEPTH - IN_LANES; n++) buf0[n] <= buf0[n + IN_LANES];
      for (int l = 0; l < IN_LANES; l++) buf0[DEPTH - IN_LANES + l] <= din[l];
    end
  end

  assign dout = buf3;
endmodule
