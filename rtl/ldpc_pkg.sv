// ldpc_pkg: widths, message types and the parity-check matrices of the two
// decoders.
//
// Number formats follow the decoders' datapaths. A message is 6-bit
// sign-magnitude (bit 5 = sign, 1 = negative LLR; bits 4:0 = magnitude with
// 4 fractional bits). A channel value is 5-bit sign-magnitude with the same
// LSB weight (bit 4 = sign, bits 3:0 = magnitude). Bit-node sums are 8-bit
// two's complement (4 integer, 4 fractional bits).
//
// Parity-check matrices. Both codes are irregular, column weight 3, built by
// closed formulas (no stored tables), so both the decoders and any model can
// evaluate them at elaboration time:
//
//   Code I  (600,450): H is 150 x 600. Column c, edge k in 0..2:
//     row = (A*t + G*q + Hq*t*q + B) mod 150,  t = c mod 150, q = c / 150.
//     Row weights are 11 or 14.
//
//   Code II (1200,720): H is 480 x 1200, split into four 240 x 600 quadrants
//     h00 h01 / h10 h11. Column c = 600*s + j (s = column half). Edge k=0 lies
//     in the upper row half, k=2 in the lower one, k=1 in the upper half when
//     j < 300, else in the lower half. With u = j - J0 (J0 = 300 for the k=1
//     edge of j >= 300, else 0), t = u mod 240, q = u / 240:
//       row = 240*half + (A*t + G*q + B) mod 240.
//     Every quadrant holds 900 edges, row weights are 7, 8 or 9, and the
//     matrix has no 4-cycles.
//
// The constants were chosen by a search for those properties; the same
// functions give the inverse maps (row -> edges) the hardware is wired by.
package ldpc_pkg;

  localparam int MSG_W  = 6;   // sign + 5-bit magnitude
  localparam int MAG_W  = 5;
  localparam int CH_W   = 5;   // sign + 4-bit magnitude
  localparam int SUM_W  = 8;   // two's complement bit-node sum
  localparam int MAG_MAX = (1 << MAG_W) - 1;

  typedef logic [MSG_W-1:0] msg_t;
  typedef logic [CH_W-1:0]  ch_t;
  typedef logic [MAG_W-1:0] mag_t;

  // -------------------------------------------------------------- arithmetic
  function automatic int gcd(input int a, input int b);
    int x = a, y = b, r;
    while (y != 0) begin r = x % y; x = y; y = r; end
    return x;
  endfunction

  // inverse of a modulo n (a and n coprime)
  function automatic int modinv(input int a, input int n);
    int t = 0, nt = 1, r = n, nr = a % n, qq, tmp;
    while (nr != 0) begin
      qq = r / nr;
      tmp = t - qq * nt; t = nt; nt = tmp;
      tmp = r - qq * nr; r = nr; nr = tmp;
    end
    if (t < 0) t += n;
    return t;
  endfunction

  function automatic int pmod(input int a, input int n);
    int r = a % n;
    return (r < 0) ? r + n : r;
  endfunction

  // ------------------------------------------------------------------ Code I
  localparam int C1_N = 600;
  localparam int C1_M = 150;
  localparam int C1_EDGES = 1800;
  localparam int C1_MAXDEG = 14;

  function automatic int c1_a (input int k); return (k == 0) ? 7   : (k == 1) ? 127 : 97;  endfunction
  function automatic int c1_g (input int k); return (k == 0) ? 115 : (k == 1) ? 2   : 102; endfunction
  function automatic int c1_hq(input int k); return (k == 2) ? 100 : 0; endfunction
  function automatic int c1_b (input int k); return (k == 0) ? 38  : (k == 1) ? 3   : 90;  endfunction

  // row of edge k of column c
  function automatic int c1_row(input int c, input int k);
    int t = c % 150, q = c / 150;
    return pmod(c1_a(k) * t + c1_g(k) * q + c1_hq(k) * t * q + c1_b(k), 150);
  endfunction

  // edge index (3*column + k) of the p-th edge of row r, or -1 if the row
  // has fewer than p+1 edges. Edges are ordered by k, then q, then t.
  function automatic int c1_row_edge(input int r, input int p);
    int cnt = 0;
    for (int k = 0; k < 3; k++)
      for (int q = 0; q < 4; q++) begin
        int m   = pmod(c1_a(k) + c1_hq(k) * q, 150);
        int rhs = pmod(r - c1_g(k) * q - c1_b(k), 150);
        int d   = gcd(m, 150);
        if (rhs % d == 0) begin
          int n  = 150 / d;
          int t0 = pmod((rhs / d) * modinv((m / d) % n, n), n);
          for (int s = 0; s < d; s++) begin
            if (cnt == p) return 3 * (150 * q + t0 + s * n) + k;
            cnt++;
          end
        end
      end
    return -1;
  endfunction

  // CNU port (position in its row) of edge e = 3*column + k
  function automatic int c1_edge_port(input int e);
    int r = c1_row(e / 3, e % 3);
    for (int p = 0; p < C1_MAXDEG; p++) if (c1_row_edge(r, p) == e) return p;
    return -1;
  endfunction

  function automatic int c1_row_deg(input int r);
    int d = 0;
    for (int p = 0; p < C1_MAXDEG; p++) if (c1_row_edge(r, p) >= 0) d++;
    return d;
  endfunction

  // ----------------------------------------------------------------- Code II
  localparam int C2_N = 1200;
  localparam int C2_M = 480;
  localparam int C2_HALF_COLS = 600;   // columns per BNU set
  localparam int C2_HALF_ROWS = 240;   // rows per CNU set
  localparam int C2_QEDGES = 900;      // edges per quadrant
  localparam int C2_NPOS = 5;          // candidate edge positions per row and quadrant
  localparam int C2_MAXDEG = 9;

  // layer constants, indexed by column half s and edge k
  function automatic int c2_a(input int s, input int k);
    return (k == 1) ? ((s == 0) ? 29 : 173) : 109;
  endfunction
  function automatic int c2_g(input int s, input int k);
    case (k)
      0: return (s == 0) ? 173 : 108;
      1: return (s == 0) ? 90  : 34;
      default: return (s == 0) ? 9 : 134;
    endcase
  endfunction
  function automatic int c2_b(input int s, input int k);
    case (k)
      0: return (s == 0) ? 0   : 10;
      1: return (s == 0) ? 143 : 201;
      default: return (s == 0) ? 88 : 198;
    endcase
  endfunction

  // row half (0 upper, 1 lower) of edge k of local column j
  function automatic int c2_half(input int j, input int k);
    return (k == 0) ? 0 : (k == 2) ? 1 : ((j < 300) ? 0 : 1);
  endfunction

  // global row of edge k of column 600*s + j
  function automatic int c2_row(input int s, input int j, input int k);
    int j0 = (k == 1 && j >= 300) ? 300 : 0;
    int u  = j - j0;
    return 240 * c2_half(j, k) + pmod(c2_a(s, k) * (u % 240) + c2_g(s, k) * (u / 240) + c2_b(s, k), 240);
  endfunction

  // Candidate position pos (0..4) of local row i in quadrant (half h, column
  // half s): positions 0..2 are the full-width layer (k = 0 or 2) with
  // q = 0..2, positions 3..4 the k = 1 layer with q = 0..1. Returns the local
  // column j, or -1 when the position holds no edge; c2_cand_k gives its
  // edge index k. Whether a position holds an edge does not depend on h.
  function automatic int c2_cand_k(input int h, input int pos);
    return (pos < 3) ? ((h == 0) ? 0 : 2) : 1;
  endfunction

  function automatic int c2_cand_col(input int h, input int s, input int i, input int pos);
    int kk   = (pos < 3) ? ((h == 0) ? 0 : 2) : 1;
    int q    = (pos < 3) ? pos : pos - 3;
    int size = (pos < 3) ? 600 : 300;
    int j0   = (kk == 1 && h == 1) ? 300 : 0;
    int t    = pmod((i - c2_g(s, kk) * q - c2_b(s, kk)) * modinv(c2_a(s, kk), 240), 240);
    if (240 * q + t >= size) return -1;
    return j0 + 240 * q + t;
  endfunction

  function automatic bit c2_pos_valid(input int s, input int i, input int pos);
    return c2_cand_col(0, s, i, pos) >= 0;
  endfunction

  // number of edges of local row i (identical for both row halves)
  function automatic int c2_row_deg(input int i);
    int d = 0;
    for (int s = 0; s < 2; s++)
      for (int pos = 0; pos < C2_NPOS; pos++) if (c2_pos_valid(s, i, pos)) d++;
    return d;
  endfunction

  // CNU input port p of CNU i -> flat position s*5+pos, or -1 if unused
  function automatic int c2_port_pos(input int i, input int p);
    int cnt = 0;
    for (int s = 0; s < 2; s++)
      for (int pos = 0; pos < C2_NPOS; pos++)
        if (c2_pos_valid(s, i, pos)) begin
          if (cnt == p) return s * C2_NPOS + pos;
          cnt++;
        end
    return -1;
  endfunction

  // inverse of c2_port_pos: CNU port that carries flat position s*5+pos of row i
  function automatic int c2_pos_port(input int i, input int flat);
    int cnt = 0;
    for (int f = 0; f < 2 * C2_NPOS; f++)
      if (c2_pos_valid(f / C2_NPOS, i, f % C2_NPOS)) begin
        if (f == flat) return cnt;
        cnt++;
      end
    return -1;
  endfunction

  // candidate position of edge k of local column j (column half s)
  function automatic int c2_edge_pos(input int j, input int k);
    int j0 = (k == 1 && j >= 300) ? 300 : 0;
    int q  = (j - j0) / 240;
    return (k == 1) ? 3 + q : q;
  endfunction

  // MMU-1 slot of edge k of local column j: upper-half edges in sub-blocks
  // A/B/D, lower-half edges in C/E, 900 slots each.
  function automatic int c2_bnu_slot(input int j, input int k);
    if (k == 1) return (j < 300) ? 600 + j : 600 + (j - 300);
    return j;
  endfunction

endpackage
