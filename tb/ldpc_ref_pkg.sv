// ldpc_ref_pkg: bit-true reference model for the decoder testbenches.
//
// A plain flooding min-sum decoder written over integers from the column
// view of the parity-check matrices only (row of edge k of each column):
// messages are integers in [-31, 31], channel values in [-15, 15], the bit
// node sum is clipped to +-31, and the hard decision is 1 when the full sum
// is negative. It shares no wiring tables with the decoders.
package ldpc_ref_pkg;
  import ldpc_pkg::*;

  function automatic int clip31(input int v);
    return (v > 31) ? 31 : (v < -31) ? -31 : v;
  endfunction

  // sign-magnitude channel value -> integer
  function automatic int ch2int(input logic [4:0] c);
    return c[4] ? -int'(c[3:0]) : int'(c[3:0]);
  endfunction

  function automatic logic [4:0] int2ch(input int v);
    return (v < 0) ? {1'b1, 4'(-v)} : {1'b0, 4'(v)};
  endfunction

  // Generic flooding min-sum. rows[e] is the row of edge e = 3*col + k.
  function automatic void minsum(input int ncol, input int nrow, input int rows[],
                                 input int ch[], input int iter, output bit dec[]);
    int v[], cm[];
    int ne = 3 * ncol;
    v = new[ne]; cm = new[ne]; dec = new[ncol];
    for (int e = 0; e < ne; e++) v[e] = ch[e / 3];
    for (int it = 0; it < iter; it++) begin
      // check nodes: per row the two smallest magnitudes and the edge of
      // the smallest, then min over the other edges for every edge
      begin
        int mn1[], mn2[], arg[]; bit sg[];
        mn1 = new[nrow]; mn2 = new[nrow]; arg = new[nrow]; sg = new[nrow];
        for (int r = 0; r < nrow; r++) begin mn1[r] = 1000; mn2[r] = 1000; arg[r] = -1; sg[r] = 0; end
        for (int e = 0; e < ne; e++) begin
          int r = rows[e];
          int a = (v[e] < 0) ? -v[e] : v[e];
          sg[r] ^= (v[e] < 0);
          if (a < mn1[r]) begin mn2[r] = mn1[r]; mn1[r] = a; arg[r] = e; end
          else if (a < mn2[r]) mn2[r] = a;
        end
        for (int e = 0; e < ne; e++) begin
          int r = rows[e];
          int mo = (arg[r] == e) ? mn2[r] : mn1[r];
          bit so = sg[r] ^ (v[e] < 0);
          cm[e] = so ? -mo : mo;
        end
      end
      // bit nodes
      for (int c = 0; c < ncol; c++) begin
        int tot = ch[c] + cm[3*c] + cm[3*c+1] + cm[3*c+2];
        for (int k = 0; k < 3; k++) v[3*c+k] = clip31(tot - cm[3*c+k]);
        dec[c] = (tot < 0);
      end
    end
  endfunction

  function automatic void c1_rows(output int rows[]);
    rows = new[1800];
    for (int c = 0; c < 600; c++) for (int k = 0; k < 3; k++) rows[3*c+k] = c1_row(c, k);
  endfunction

  function automatic void c2_rows(output int rows[]);
    rows = new[3600];
    for (int c = 0; c < 1200; c++) for (int k = 0; k < 3; k++) rows[3*c+k] = c2_row(c / 600, c % 600, k);
  endfunction
endpackage
