// cmp2: two-input compare unit (CMP-2) of the min-sum check node.
//
// One subtractor decides which of the two magnitudes is smaller; the smaller
// is "min", the other "sec" (the second minimum of the pair). On a tie input
// a is taken as min. Purely combinational. The CMP-2 block and its use in the
// comparator tree follow the decoder description; the tie rule is this
// design's own.
module cmp2 #(
  parameter int W = 5
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] min,
  output logic [W-1:0] sec
);
  logic [W:0] diff;
  always_comb begin
    diff = {1'b0, b} - {1'b0, a};   // borrow set when b < a
    if (diff[W]) begin
      min = b; sec = a;
    end else begin
      min = a; sec = b;
    end
  end
endmodule
