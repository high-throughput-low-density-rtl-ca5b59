// cnu9: check node unit of the Code II decoder (min-sum, up to nine edges).
//
// For every input edge the unit returns the product of the other edges'
// signs and the minimum magnitude over the other edges. As in the modified
// min-sum rule, the magnitudes are searched once for the minimum and second
// minimum (CS9 = CMP-9 plus selection control); an edge whose own magnitude
// equals the minimum receives the second minimum, every other edge the
// minimum. Signs: SM9 XORs all signs, and each output sign is that total
// XOR the edge's own sign.
//
// Interface: msg_in/msg_out are 6-bit sign-magnitude messages; used[p] = 0
// marks a port with no edge (rows of weight 7 or 8). An unused port enters
// the search as magnitude 31, sign 0, and its output is driven to 0.
// Timing: purely combinational (the Code II decoder performs one
// check-node set per clock with no pipeline stage). The SM/CS split follows
// the decoder description; port masking is this design's own.
module cnu9
  import ldpc_pkg::*;
#(
  parameter int DEG = 9
) (
  input  msg_t           msg_in  [DEG],
  input  logic [DEG-1:0] used,
  output msg_t           msg_out [DEG]
);
  mag_t mag [9];
  logic [DEG-1:0] sgn;
  logic sgn_all;
  mag_t min, sec;

  always_comb begin
    for (int p = 0; p < 9; p++) mag[p] = mag_t'(MAG_MAX);
    for (int p = 0; p < DEG; p++) begin
      sgn[p] = used[p] & msg_in[p][MSG_W-1];
      if (used[p]) mag[p] = msg_in[p][MAG_W-1:0];
    end
    sgn_all = ^sgn;
  end

  cmp9 #(.W(MAG_W)) u_cmp (.m(mag), .min(min), .sec(sec));

  always_comb begin
    for (int p = 0; p < DEG; p++) begin
      if (!used[p]) msg_out[p] = '0;
      else msg_out[p] = {sgn_all ^ sgn[p], (mag[p] == min) ? sec : min};
    end
  end
endmodule
