// cmp4: four-input compare unit (CMP-4) returning the minimum and the second
// minimum of four magnitudes.
//
// Six subtractors compare every pair, (a,b) (a,c) (a,d) (b,c) (b,d) (c,d),
// and only their borrow bits (MSB5..MSB0) go on to a decoder. The decoder
// ranks each input by how many others precede it (smaller value, or equal
// value and lower index) and selects rank 0 as min and rank 1 as the second
// minimum. Purely combinational. The six-subtractor structure follows the
// decoder description; the ranking logic of the decoder is this design's own.
module cmp4 #(
  parameter int W = 5
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] min,
  output logic [W-1:0] sec
);
  logic [5:0]   msb;          // msb[x] = 1 when the first operand is smaller
  logic [W-1:0] v [4];
  logic [1:0]   rank [4];
  // pair table: {first, second} for MSB5 .. MSB0
  localparam int PA [6] = '{2, 1, 1, 0, 0, 0};
  localparam int PB [6] = '{3, 3, 2, 3, 2, 1};

  always_comb begin
    logic [W:0] diff;
    v[0] = a; v[1] = b; v[2] = c; v[3] = d;
    for (int x = 0; x < 6; x++) begin
      diff   = {1'b0, v[PA[x]]} - {1'b0, v[PB[x]]};
      msb[x] = diff[W];
    end
    for (int i = 0; i < 4; i++) rank[i] = '0;
    // first operand (lower index) precedes unless the second is strictly smaller
    for (int x = 0; x < 6; x++) begin
      logic second_smaller;
      second_smaller = !msb[x] && (v[PA[x]] != v[PB[x]]);
      if (second_smaller) rank[PA[x]] = rank[PA[x]] + 2'd1;
      else                rank[PB[x]] = rank[PB[x]] + 2'd1;
    end
    min = '0; sec = '0;
    for (int i = 0; i < 4; i++) begin
      if (rank[i] == 2'd0) min = min | v[i];
      if (rank[i] == 2'd1) sec = sec | v[i];
    end
  end
endmodule
