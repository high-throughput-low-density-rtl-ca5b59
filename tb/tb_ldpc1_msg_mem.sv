// tb_ldpc1_msg_mem: checks the Code I edge memory and its two switch groups.
// The expected row contents are built here independently by scanning every
// column of H (edges of a row ordered by edge index k, then by column). The
// test writes random messages from the bit side for all four column sets and
// reads them back through the check side for all three row sets, then the
// reverse, and finally checks that the bit side wins a simultaneous write.
module tb_ldpc1_msg_mem;
  import ldpc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [1:0] c_rset = 0, c_wset = 0, b_rset = 0, b_wset = 0;
  logic c_we = 0, b_we = 0;
  msg_t c_rd [50][C1_MAXDEG], c_wd [50][C1_MAXDEG], b_rd [150][3], b_wd [150][3];
  msg_t model [600][3];
  int row_col [150][C1_MAXDEG], row_k [150][C1_MAXDEG], row_n [150];
  int checks = 0, failures = 0;

  ldpc1_msg_mem dut (.clk(clk), .c_rset(c_rset), .c_rd(c_rd), .c_we(c_we), .c_wset(c_wset), .c_wd(c_wd),
                     .b_rset(b_rset), .b_rd(b_rd), .b_we(b_we), .b_wset(b_wset), .b_wd(b_wd));

  task automatic check_c_side;
    for (int cs = 0; cs < 3; cs++) begin
      c_rset = 2'(cs); #1;
      for (int i = 0; i < 50; i++)
        for (int p = 0; p < C1_MAXDEG; p++) begin
          automatic int r = 50 * cs + i;
          msg_t e = (p < row_n[r]) ? model[row_col[r][p]][row_k[r][p]] : '0;
          checks++;
          if (c_rd[i][p] != e) begin failures++; if (failures < 5) $display("FAIL c r=%0d p=%0d %h %h", r, p, c_rd[i][p], e); end
        end
    end
  endtask

  task automatic check_b_side;
    for (int bs = 0; bs < 4; bs++) begin
      b_rset = 2'(bs); #1;
      for (int j = 0; j < 150; j++)
        for (int k = 0; k < 3; k++) begin
          checks++;
          if (b_rd[j][k] != model[150 * bs + j][k]) begin failures++; if (failures < 5) $display("FAIL b c=%0d k=%0d", 150 * bs + j, k); end
        end
    end
  endtask

  initial begin
    for (int r = 0; r < 150; r++) row_n[r] = 0;
    for (int k = 0; k < 3; k++)
      for (int c = 0; c < 600; c++) begin
        automatic int r = c1_row(c, k);
        row_col[r][row_n[r]] = c; row_k[r][row_n[r]] = k; row_n[r]++;
      end
    for (int r = 0; r < 150; r++) begin
      checks++;
      if (row_n[r] != 11 && row_n[r] != 14) failures++;
    end
    // bit-side writes
    for (int pass = 0; pass < 2; pass++) begin
      for (int bs = 0; bs < 4; bs++) begin
        for (int j = 0; j < 150; j++)
          for (int k = 0; k < 3; k++) begin
            b_wd[j][k] = msg_t'($urandom);
            model[150 * bs + j][k] = b_wd[j][k];
          end
        b_we = 1; b_wset = 2'(bs);
        @(posedge clk); #1; b_we = 0;
      end
      check_c_side();
      // check-side writes
      for (int cs = 0; cs < 3; cs++) begin
        for (int i = 0; i < 50; i++)
          for (int p = 0; p < C1_MAXDEG; p++) begin
            automatic int r = 50 * cs + i;
            c_wd[i][p] = msg_t'($urandom);
            if (p < row_n[r]) model[row_col[r][p]][row_k[r][p]] = c_wd[i][p];
          end
        c_we = 1; c_wset = 2'(cs);
        @(posedge clk); #1; c_we = 0;
      end
      check_b_side();
      check_c_side();
    end
    // simultaneous write: bit side set 0 and check side set 0 -> bit side wins
    for (int j = 0; j < 150; j++) for (int k = 0; k < 3; k++) begin
      b_wd[j][k] = msg_t'($urandom); model[j][k] = b_wd[j][k];
    end
    for (int i = 0; i < 50; i++) for (int p = 0; p < C1_MAXDEG; p++) begin
      c_wd[i][p] = msg_t'($urandom);
      if (p < row_n[i] && row_col[i][p] >= 150) model[row_col[i][p]][row_k[i][p]] = c_wd[i][p];
    end
    b_we = 1; b_wset = 0; c_we = 1; c_wset = 0;
    @(posedge clk); #1; b_we = 0; c_we = 0;
    check_b_side();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
