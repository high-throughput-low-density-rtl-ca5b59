// ldpc1_decoder: (600,450) LDPC decoder, partially parallel, 8 min-sum
// iterations in 77 clocks per codeword.
//
// The 150 x 600 parity-check matrix is cut into three row sets of 50 rows and
// four column sets of 150 columns. 50 check node units (cnu14) serve one row
// set per clock and 150 bit node units (bnu, pipelined) one column set per
// clock; a memory bank with switch groups (ldpc1_msg_mem) holds the 1800
// edge messages between them. Both unit types carry one pipeline register,
// so a unit reads the bank in one clock and writes its results back at the
// end of the next one.
//
// Channel values are connected to the bit node units only (distributor).
// Decoding starts with an extra vertical step whose check messages are forced
// to zero, which copies the channel values into the bank.
//
// Schedule of a run (clock n = 0..76):
//   n = 0..3        BNU sets 0..3 read (loading), written back at n+1
//   per iteration t = 0..7, base = 5 + 9t:
//     base+0..2     CNU sets 0..2 read, results written one clock later
//     base+4..7     BNU sets 0..3 read, results written one clock later
//   so an iteration takes 4 + 5 = 9 clocks and the run 5 + 9*8 = 77 clocks.
// The hard decisions of the last vertical step leave in clocks 73..76, one
// 150-bit column set per clock (out_set).
//
// Interface: channel values (5-bit sign-magnitude, positive = bit 0 more
// likely) are accepted IN_LANES per clock while in_ready is high, columns
// 0..599 in order; the run starts after the 600th value. Loading and decoding
// do not overlap.
//
// Unit counts, partition, pipelining and the 77-clock schedule follow the
// decoder description; the parity-check matrix, the input handshake and the
// memory organisation are this design's own.
module ldpc1_decoder
  import ldpc_pkg::*;
#(
  parameter int IN_LANES = 1,
  parameter int ITER     = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  ch_t          in_llr [IN_LANES],
  output logic         out_valid,
  output logic [1:0]   out_set,    // bits 150*out_set + j
  output logic [149:0] out_bits,
  output logic         busy
);
  localparam int RUN = 5 + 9 * ITER;
  localparam int FILL_CYC = 600 / IN_LANES;

  typedef enum logic {S_FILL, S_DEC} state_t;
  state_t state;
  logic [$clog2(FILL_CYC+1)-1:0] fill_cnt;
  logic [$clog2(RUN+1)-1:0] n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_FILL;
      fill_cnt <= '0;
      n        <= '0;
    end else if (state == S_FILL) begin
      if (in_valid) begin
        if (32'(fill_cnt) == FILL_CYC - 1) begin
          fill_cnt <= '0;
          n        <= '0;
          state    <= S_DEC;
        end else fill_cnt <= fill_cnt + 1'b1;
      end
    end else begin
      if (32'(n) == RUN - 1) state <= S_FILL;
      n <= n + 1'b1;
    end
  end

  assign in_ready = (state == S_FILL);
  assign busy     = (state == S_DEC);

  // read-stage control decoded from the clock counter
  logic       b_act, c_act, load;
  logic [1:0] bset, cset;
  always_comb begin
    int m, ph;
    b_act = 1'b0; c_act = 1'b0; load = 1'b0; bset = '0; cset = '0;
    m = 0; ph = 0;
    if (busy) begin
      if (n < 4) begin
        b_act = 1'b1; load = 1'b1; bset = n[1:0];
      end else if (n >= 5) begin
        m  = int'(n) - 5;
        ph = m % 9;
        if (ph < 3) begin
          c_act = 1'b1; cset = 2'(ph);
        end else if (ph >= 4 && ph < 8) begin
          b_act = 1'b1; bset = 2'(ph - 4);
        end
      end
    end
  end

  // write-stage control: one clock behind the read stage
  logic       b_we, c_we;
  logic [1:0] b_wset, c_wset;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_we <= 1'b0; c_we <= 1'b0; b_wset <= '0; c_wset <= '0;
    end else begin
      b_we <= b_act; c_we <= c_act; b_wset <= bset; c_wset <= cset;
    end
  end

  // channel values
  ch_t ch [150];
  ldpc1_distributor #(.N(600), .NSET(4), .IN_LANES(IN_LANES)) u_dist (
    .clk(clk), .shift(in_ready && in_valid), .din(in_llr), .set(bset), .dout(ch));

  // memory bank and switch groups
  msg_t c_rd [50][C1_MAXDEG], c_wd [50][C1_MAXDEG];
  msg_t b_rd [150][3], b_wd [150][3];
  ldpc1_msg_mem u_mem (
    .clk(clk),
    .c_rset(cset), .c_rd(c_rd), .c_we(c_we), .c_wset(c_wset), .c_wd(c_wd),
    .b_rset(bset), .b_rd(b_rd), .b_we(b_we), .b_wset(b_wset), .b_wd(b_wd));

  // bit node units
  logic [149:0] dec;
  for (genvar j = 0; j < 150; j++) begin : g_bnu
    msg_t cin [3];
    for (genvar k = 0; k < 3; k++) begin : g_k
      assign cin[k] = load ? '0 : b_rd[j][k];
    end
    bnu #(.PIPE(1'b1)) u_bnu (.clk(clk), .c_in(cin), .ch(ch[j]), .c_out(b_wd[j]), .dec(dec[j]));
  end

  // check node units; a port is used when the row of the active set has an
  // edge there (rows of weight 11 leave three ports unused)
  for (genvar i = 0; i < 50; i++) begin : g_cnu
    logic [C1_MAXDEG-1:0] used;
    for (genvar p = 0; p < C1_MAXDEG; p++) begin : g_p
      localparam bit U0 = c1_row_edge(i, p) >= 0;
      localparam bit U1 = c1_row_edge(50 + i, p) >= 0;
      localparam bit U2 = c1_row_edge(100 + i, p) >= 0;
      assign used[p] = (cset == 2'd0) ? U0 : (cset == 2'd1) ? U1 : U2;
    end
    cnu14 #(.DEG(C1_MAXDEG)) u_cnu (.clk(clk), .msg_in(c_rd[i]), .used(used), .msg_out(c_wd[i]));
  end

  assign out_valid = b_we && (32'(n) >= RUN - 4) && busy;
  assign out_set   = b_wset;
  assign out_bits  = dec;
endmodule
