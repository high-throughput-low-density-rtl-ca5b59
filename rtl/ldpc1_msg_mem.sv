// ldpc1_msg_mem: message memory bank of the Code I decoder together with its
// switch groups.
//
// The bank holds the 1800 messages of the 150 x 600 parity-check matrix, one
// per edge, in column order (edge 3*c + k is edge k of column c). It is read
// and written from two sides:
//   - check side: CNU i, port p of row set cset (rows 50*cset + i) sees the
//     p-th edge of its row; unused ports read 0;
//   - bit side:   BNU j, port k of column set bset (columns 150*bset + j)
//     sees edge k of its column.
// The switch groups are the per-port multiplexers that pick, for the active
// set, which stored edge a unit port reads, and the write enables that route
// a unit's result back to that edge. Reads are combinational; writes take
// effect at the clock edge. The two sides are never written in the same
// clock by the decoder's schedule; if they were, the bit side would win.
// The memory/switch arrangement is this design's own reading of the
// decoder's block diagram.
module ldpc1_msg_mem
  import ldpc_pkg::*;
(
  input  logic       clk,
  input  logic [1:0] c_rset,              // check-side read set (0..2)
  output msg_t       c_rd [50][C1_MAXDEG],
  input  logic       c_we,
  input  logic [1:0] c_wset,
  input  msg_t       c_wd [50][C1_MAXDEG],
  input  logic [1:0] b_rset,              // bit-side read set (0..3)
  output msg_t       b_rd [150][3],
  input  logic       b_we,
  input  logic [1:0] b_wset,
  input  msg_t       b_wd [150][3]
);
  msg_t mem [C1_EDGES];

  // write: every edge knows its CNU/port and BNU/port at elaboration time
  for (genvar e = 0; e < C1_EDGES; e++) begin : g_e
    localparam int COL  = e / 3;
    localparam int K    = e % 3;
    localparam int BSET = COL / 150;
    localparam int BJ   = COL % 150;
    localparam int ROW  = c1_row(COL, K);
    localparam int CSET = ROW / 50;
    localparam int CI   = ROW % 50;
    localparam int CP   = c1_edge_port(e);
    always_ff @(posedge clk) begin
      if (b_we && b_wset == 2'(BSET))      mem[e] <= b_wd[BJ][K];
      else if (c_we && c_wset == 2'(CSET)) mem[e] <= c_wd[CI][CP];
    end
  end

  // check-side switch group
  for (genvar i = 0; i < 50; i++) begin : g_ci
    for (genvar p = 0; p < C1_MAXDEG; p++) begin : g_cp
      localparam int E0 = c1_row_edge(i, p);
      localparam int E1 = c1_row_edge(50 + i, p);
      localparam int E2 = c1_row_edge(100 + i, p);
      always_comb begin
        case (c_rset)
          2'd0:    c_rd[i][p] = (E0 >= 0) ? mem[(E0 >= 0) ? E0 : 0] : '0;
          2'd1:    c_rd[i][p] = (E1 >= 0) ? mem[(E1 >= 0) ? E1 : 0] : '0;
          default: c_rd[i][p] = (E2 >= 0) ? mem[(E2 >= 0) ? E2 : 0] : '0;
        endcase
      end
    end
  end

  // bit-side switch group
  always_comb begin
    for (int j = 0; j < 150; j++)
      for (int k = 0; k < 3; k++)
        b_rd[j][k] = mem[3 * (150 * b_rset + j) + k];
  end
endmodule
