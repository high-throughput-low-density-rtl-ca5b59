// cmp14: pipelined minimum / second-minimum search over 14 magnitudes
// (CMP-14 of the Code I check node unit).
//
// First stage: three CMP-4 units (inputs 0..11) and one CMP-2 (inputs 12,13)
// each produce a local min and second min, which are registered. Second
// stage: one CMP-4 ranks the four local minima (giving the overall min and a
// candidate second value), another CMP-4 finds the smallest local second
// minimum, and a CMP-2 picks the overall second minimum from those two.
// Latency is one clock: the register splits the check-node path as the Code I
// pipeline requires. Structure follows the decoder's CMP-14 drawing.
module cmp14 #(
  parameter int W = 5
) (
  input  logic         clk,
  input  logic [W-1:0] m [14],
  output logic [W-1:0] min,
  output logic [W-1:0] sec
);
  logic [W-1:0] s1_min [4], s1_sec [4];
  logic [W-1:0] q_min [4], q_sec [4];
  logic [W-1:0] mm_sec, ss_min, ss_unused, fin_unused;

  for (genvar g = 0; g < 3; g++) begin : g_c4
    cmp4 #(.W(W)) u (.a(m[4*g]), .b(m[4*g+1]), .c(m[4*g+2]), .d(m[4*g+3]),
                     .min(s1_min[g]), .sec(s1_sec[g]));
  end
  cmp2 #(.W(W)) u_c2 (.a(m[12]), .b(m[13]), .min(s1_min[3]), .sec(s1_sec[3]));

  always_ff @(posedge clk) begin
    q_min <= s1_min;
    q_sec <= s1_sec;
  end

  cmp4 #(.W(W)) u_mins (.a(q_min[0]), .b(q_min[1]), .c(q_min[2]), .d(q_min[3]),
                        .min(min), .sec(mm_sec));
  cmp4 #(.W(W)) u_secs (.a(q_sec[0]), .b(q_sec[1]), .c(q_sec[2]), .d(q_sec[3]),
                        .min(ss_min), .sec(ss_unused));
  cmp2 #(.W(W)) u_fin  (.a(mm_sec), .b(ss_min), .min(sec), .sec(fin_unused));
endmodule
