// cmp9: minimum and second minimum of nine magnitudes (CMP-9 of the Code II
// check node unit).
//
// Built from the same parts as the larger comparator tree: two CMP-4 units
// search inputs 0..3 and 4..7, a third CMP-4 ranks their four results, and
// two CMP-2 units merge in input 8. Purely combinational, since the Code II
// decoder closes a check-node step in one clock. The use of CMP-4/CMP-2
// follows the decoder description; this particular arrangement for nine
// inputs is this design's own.
module cmp9 #(
  parameter int W = 5
) (
  input  logic [W-1:0] m [9],
  output logic [W-1:0] min,
  output logic [W-1:0] sec
);
  logic [W-1:0] p_min, p_sec, r_min, r_sec, e_min, e_sec, x_max, unused_sec;

  cmp4 #(.W(W)) u_lo  (.a(m[0]), .b(m[1]), .c(m[2]), .d(m[3]), .min(p_min), .sec(p_sec));
  cmp4 #(.W(W)) u_hi  (.a(m[4]), .b(m[5]), .c(m[6]), .d(m[7]), .min(r_min), .sec(r_sec));
  cmp4 #(.W(W)) u_mid (.a(p_min), .b(p_sec), .c(r_min), .d(r_sec), .min(e_min), .sec(e_sec));
  // merge the ninth input: min(e_min, m8); second = min(larger of those, e_sec)
  cmp2 #(.W(W)) u_m1  (.a(e_min), .b(m[8]), .min(min), .sec(x_max));
  cmp2 #(.W(W)) u_m2  (.a(e_sec), .b(x_max), .min(sec), .sec(unused_sec));
endmodule
