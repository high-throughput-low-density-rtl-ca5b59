// cnu14: check node unit of the Code I decoder (min-sum, up to 14 edges),
// pipelined.
//
// Same rule as the Code II unit: each output edge gets the XOR of the other
// edges' signs and the minimum magnitude of the other edges, found through a
// single min / second-min search (CS14 built on CMP-14) and a selection that
// hands the second minimum to the edge holding the minimum. The register
// inside CMP-14 splits the unit into CNU-PATH1 (memory to register) and
// CNU-PATH2 (register to memory); the input signs and magnitudes travel
// through a matching register so the selection is done in the second stage.
//
// Interface: 6-bit sign-magnitude messages; used[p] = 0 marks a port with no
// edge, which enters the search as magnitude 31, sign 0 and outputs 0.
// Timing: msg_out is valid one clock after msg_in. Pipeline placement follows
// the decoder description (Fig. of CMP-14); port masking is this design's own.
module cnu14
  import ldpc_pkg::*;
#(
  parameter int DEG = 14
) (
  input  logic           clk,
  input  msg_t           msg_in  [DEG],
  input  logic [DEG-1:0] used,
  output msg_t           msg_out [DEG]
);
  mag_t mag [14];
  logic [DEG-1:0] sgn;
  mag_t q_mag [DEG];
  logic [DEG-1:0] q_sgn, q_used;
  mag_t min, sec;
  logic sgn_all;

  always_comb begin
    for (int p = 0; p < 14; p++) mag[p] = mag_t'(MAG_MAX);
    for (int p = 0; p < DEG; p++) begin
      sgn[p] = used[p] & msg_in[p][MSG_W-1];
      if (used[p]) mag[p] = msg_in[p][MAG_W-1:0];
    end
  end

  cmp14 #(.W(MAG_W)) u_cmp (.clk(clk), .m(mag), .min(min), .sec(sec));

  always_ff @(posedge clk) begin
    for (int p = 0; p < DEG; p++) q_mag[p] <= mag[p];
    q_sgn  <= sgn;
    q_used <= used;
  end

  always_comb begin
    sgn_all = ^q_sgn;
    for (int p = 0; p < DEG; p++) begin
      if (!q_used[p]) msg_out[p] = '0;
      else msg_out[p] = {sgn_all ^ q_sgn[p], (q_mag[p] == min) ? sec : min};
    end
  end
endmodule
