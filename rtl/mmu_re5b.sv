// mmu_re5b: message memory unit built on register exchange among five
// sub-blocks (RE-5B). It turns the block order in which one processing array
// produces the messages of a codeword into the block order in which the
// other array consumes them, with fixed wiring and no multiplexers on the
// datapath ports.
//
// The parity-check matrix is split 2x2 into quadrants. A producer emits one
// codeword in two clocks: phase 0 delivers quadrant pair (x0, y0), phase 1
// delivers (x1, y1). The consumer needs (x0, x1) and then (y0, y1). Sub-blocks
// B, C, D, E capture producer data and A, C drive the consumer:
//
//   phase 0 edge:  A <= D,  C <= E,  B <= in_b (x0),  D <= in_d (y0)
//   phase 1 edge:  A <= B,  C <= in_c (x1),  E <= in_e (y1),  D holds
//
// so in the phase-0 clock that follows, out_a/out_c show (x0, x1), and in the
// next phase-1 clock (y0, y1), while the producer already writes the next
// codeword. Latency is two clocks from a producer pair to the matching
// consumer pair; the unit accepts a new codeword every two clocks with no
// stall. A, B and D hold NA messages, C and E hold NC.
//
// Which sub-blocks capture and which deliver follows the decoder
// description; the exchange schedule itself is this design's own.
module mmu_re5b #(
  parameter int NA = 900,
  parameter int NC = 900,
  parameter int W  = 6
) (
  input  logic         clk,
  input  logic         en,      // advance (decoder running)
  input  logic         phase,   // 0: first block of a pair, 1: second
  input  logic [W-1:0] in_b [NA],
  input  logic [W-1:0] in_d [NA],
  input  logic [W-1:0] in_c [NC],
  input  logic [W-1:0] in_e [NC],
  output logic [W-1:0] out_a [NA],
  output logic [W-1:0] out_c [NC]
);
  logic [W-1:0] sa [NA], sb [NA], sd [NA];
  logic [W-1:0] sc [NC], se [NC];

  always_ff @(posedge clk) begin
    if (en) begin
      if (!phase) begin
        sa <= sd;
        sc <= se;
        sb <= in_b;
        sd <= in_d;
      end else begin
        sa <= sb;
        sc <= in_c;
        se <= in_e;
      end
    end
  end

  assign out_a = sa;
  assign out_c = sc;
endmodule
