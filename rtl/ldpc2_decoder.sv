// ldpc2_decoder: (1200,720) LDPC decoder that decodes two codewords at once,
// 8 min-sum iterations in 36 clocks per codeword pair.
//
// The 480 x 1200 parity-check matrix is split into four 240 x 600 quadrants
// (h00 h01 / h10 h11). 240 check node units (cnu9) serve one row half per
// clock and 600 bit node units (bnu, combinational) one column half per
// clock, so every clock 1800 of the 3600 messages are updated. Two RE-5B
// message memories sit between the arrays: MMU-0 carries bit-to-check
// messages (BNU -> CNU) and MMU-1 check-to-bit messages (CNU -> BNU). Each
// reorders quadrant pairs so that both arrays see fixed wiring.
//
// Decoding schedule (clock n = 0..35 of a run, phase = n[0], period P = n/2):
//   BNU  : period P works on codeword P%2, column half = phase.
//          P = 0,1 load the channel values (check messages forced to zero,
//          so the BNUs pass the channel values into MMU-0); P = 2..17 are
//          the 8 vertical steps of each codeword.
//   CNU  : works one period after the BNU on the same codeword
//          (rows half = phase); MMU-0 supplies its inputs.
//   The BNU of period P uses CNU results of period P-1 through MMU-1.
// Codeword 0 is loaded in clocks 0-1, codeword 1 in 2-3, and then the arrays
// alternate between the two codewords without a stall: 2 + 2 + 8 x 4 = 36
// clocks. The hard decisions of the last vertical step are output in clocks
// 32..35 as four 600-bit blocks (codeword 0 half 0, cw0 half 1, cw1 half 0,
// cw1 half 1).
//
// Channel values enter through an RS ring buffer (rs_input_buffer),
// IN_LANES per clock while in_ready is high, in the order codeword 0
// (columns 0..1199), then codeword 1. Loading and decoding do not overlap:
// after 2400 values the decoder runs 36 clocks, then accepts the next pair.
// Channel values are 5-bit sign-magnitude, positive meaning bit 0 is more
// likely. out_bits are the 1200 estimated code bits of each codeword.
//
// The partition, unit counts, memory organisation and the 36-clock schedule
// follow the decoder description. The parity-check matrix (ldpc_pkg), the
// RE-5B exchange schedule, the input lane width and the load/decode
// handshake are this design's own.
module ldpc2_decoder
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
  output logic         out_cw,     // codeword of the pair (0 or 1)
  output logic         out_half,   // column half: bits 600*out_half + j
  output logic [599:0] out_bits,
  output logic         busy
);
  localparam int NB    = 600;
  localparam int NCN   = 240;
  localparam int NSLOT0 = NCN * C2_NPOS;       // MMU-0 sub-block size
  localparam int NSLOT1 = C2_QEDGES;            // MMU-1 sub-block size
  localparam int RUN   = 4 + 4 * ITER;          // 36 clocks for 8 iterations
  localparam int FILL_CYC = NB / IN_LANES;

  // ---------------------------------------------------------------- control
  typedef enum logic [1:0] {S_FILL, S_ROT, S_DEC} state_t;
  state_t state;
  logic [$clog2(FILL_CYC+1)-1:0] fill_cnt;
  logic [1:0] blk;
  logic [$clog2(RUN+1)-1:0] cyc;

  logic shift, rotate, phase, load;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_FILL;
      fill_cnt <= '0;
      blk      <= '0;
      cyc      <= '0;
    end else begin
      case (state)
        S_FILL: if (in_valid) begin
          if (32'(fill_cnt) == FILL_CYC - 1) begin
            fill_cnt <= '0;
            if (blk == 2'd3) begin
              blk   <= '0;
              cyc   <= '0;
              state <= S_DEC;
            end else begin
              blk   <= blk + 2'd1;
              state <= S_ROT;
            end
          end else fill_cnt <= fill_cnt + 1'b1;
        end
        S_ROT: state <= S_FILL;
        S_DEC: begin
          if (32'(cyc) == RUN - 1) state <= S_FILL;
          cyc <= cyc + 1'b1;
        end
        default: state <= S_FILL;
      endcase
    end
  end

  assign in_ready = (state == S_FILL);
  assign shift    = in_ready && in_valid;
  assign rotate   = (state == S_ROT) || (state == S_DEC);
  assign phase    = cyc[0];
  assign load     = (cyc < 4);                  // periods 0 and 1
  assign busy     = (state == S_DEC);
  assign out_valid = busy && (32'(cyc) >= RUN - 4);
  assign out_cw   = cyc[1];
  assign out_half = cyc[0];

  // ---------------------------------------------------------- input buffer
  ch_t ch [NB];
  rs_input_buffer #(.DEPTH(NB), .IN_LANES(IN_LANES)) u_ibuf (
    .clk(clk), .shift(shift), .din(in_llr), .rotate(rotate), .dout(ch));

  // --------------------------------------------------------------- memories
  msg_t m0_b [NSLOT0], m0_d [NSLOT0], m0_c [NSLOT0], m0_e [NSLOT0];
  msg_t m0_a_out [NSLOT0], m0_c_out [NSLOT0];
  msg_t m1_b [NSLOT1], m1_d [NSLOT1], m1_c [NSLOT1], m1_e [NSLOT1];
  msg_t m1_a_out [NSLOT1], m1_c_out [NSLOT1];

  mmu_re5b #(.NA(NSLOT0), .NC(NSLOT0), .W(MSG_W)) u_mmu0 (
    .clk(clk), .en(busy), .phase(phase),
    .in_b(m0_b), .in_d(m0_d), .in_c(m0_c), .in_e(m0_e),
    .out_a(m0_a_out), .out_c(m0_c_out));

  mmu_re5b #(.NA(NSLOT1), .NC(NSLOT1), .W(MSG_W)) u_mmu1 (
    .clk(clk), .en(busy), .phase(phase),
    .in_b(m1_b), .in_d(m1_d), .in_c(m1_c), .in_e(m1_e),
    .out_a(m1_a_out), .out_c(m1_c_out));

  // ------------------------------------------------------------- bit nodes
  msg_t bnu_out [NB][3];
  logic [NB-1:0] dec;

  for (genvar j = 0; j < NB; j++) begin : g_bnu
    msg_t cin [3];
    for (genvar k = 0; k < 3; k++) begin : g_in
      localparam int SLOT = c2_bnu_slot(j, k);
      if (c2_half(j, k) == 0) begin : g_up
        assign cin[k] = load ? '0 : m1_a_out[SLOT];
      end else begin : g_dn
        assign cin[k] = load ? '0 : m1_c_out[SLOT];
      end
    end
    bnu #(.PIPE(1'b0)) u_bnu (.clk(clk), .c_in(cin), .ch(ch[j]),
                              .c_out(bnu_out[j]), .dec(dec[j]));
  end
  assign out_bits = dec;

  // BNU outputs -> MMU-0 slots (row i, candidate position pos)
  for (genvar i = 0; i < NCN; i++) begin : g_m0w
    for (genvar pos = 0; pos < C2_NPOS; pos++) begin : g_pos
      localparam int SL = i * C2_NPOS + pos;
      localparam int JU0 = c2_cand_col(0, 0, i, pos);   // h00 (phase 0, B)
      localparam int JL0 = c2_cand_col(1, 0, i, pos);   // h10 (phase 0, D)
      localparam int JU1 = c2_cand_col(0, 1, i, pos);   // h01 (phase 1, C)
      localparam int JL1 = c2_cand_col(1, 1, i, pos);   // h11 (phase 1, E)
      localparam int KU  = c2_cand_k(0, pos);
      localparam int KL  = c2_cand_k(1, pos);
      if (JU0 >= 0) begin : g_b assign m0_b[SL] = bnu_out[JU0][KU]; end
      else          begin : g_bz assign m0_b[SL] = '0; end
      if (JL0 >= 0) begin : g_d assign m0_d[SL] = bnu_out[JL0][KL]; end
      else          begin : g_dz assign m0_d[SL] = '0; end
      if (JU1 >= 0) begin : g_c assign m0_c[SL] = bnu_out[JU1][KU]; end
      else          begin : g_cz assign m0_c[SL] = '0; end
      if (JL1 >= 0) begin : g_e assign m0_e[SL] = bnu_out[JL1][KL]; end
      else          begin : g_ez assign m0_e[SL] = '0; end
    end
  end

  // ----------------------------------------------------------- check nodes
  msg_t cnu_out [NCN][C2_MAXDEG];

  for (genvar i = 0; i < NCN; i++) begin : g_cnu
    msg_t cin [C2_MAXDEG];
    logic [C2_MAXDEG-1:0] used;
    for (genvar p = 0; p < C2_MAXDEG; p++) begin : g_p
      localparam int F = c2_port_pos(i, p);
      if (F < 0) begin : g_nc
        assign cin[p] = '0;
        assign used[p] = 1'b0;
      end else if (F < C2_NPOS) begin : g_left
        assign cin[p] = m0_a_out[i * C2_NPOS + F];
        assign used[p] = 1'b1;
      end else begin : g_right
        assign cin[p] = m0_c_out[i * C2_NPOS + F - C2_NPOS];
        assign used[p] = 1'b1;
      end
    end
    cnu9 #(.DEG(C2_MAXDEG)) u_cnu (.msg_in(cin), .used(used), .msg_out(cnu_out[i]));
  end

  // CNU outputs -> MMU-1 slots (upper-half edges: B, D; lower-half: C, E)
  for (genvar sl = 0; sl < NSLOT1; sl++) begin : g_m1w
    localparam int JU = (sl < 600) ? sl : sl - 600;          // upper slot column
    localparam int KU = (sl < 600) ? 0 : 1;
    localparam int JL = (sl < 600) ? sl : sl - 600 + 300;    // lower slot column
    localparam int KL = (sl < 600) ? 2 : 1;
    localparam int RU0 = c2_row(0, JU, KU), RU1 = c2_row(1, JU, KU);
    localparam int RL0 = c2_row(0, JL, KL) - 240, RL1 = c2_row(1, JL, KL) - 240;
    localparam int PU0 = c2_pos_port(RU0, c2_edge_pos(JU, KU));
    localparam int PU1 = c2_pos_port(RU1, C2_NPOS + c2_edge_pos(JU, KU));
    localparam int PL0 = c2_pos_port(RL0, c2_edge_pos(JL, KL));
    localparam int PL1 = c2_pos_port(RL1, C2_NPOS + c2_edge_pos(JL, KL));
    assign m1_b[sl] = cnu_out[RU0][PU0];   // h00, phase 0
    assign m1_d[sl] = cnu_out[RU1][PU1];   // h01, phase 0
    assign m1_c[sl] = cnu_out[RL0][PL0];   // h10, phase 1
    assign m1_e[sl] = cnu_out[RL1][PL1];   // h11, phase 1
  end

endmodule
