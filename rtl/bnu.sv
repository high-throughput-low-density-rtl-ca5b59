// bnu: bit node unit for column weight 3, shared by both decoders.
//
// Inputs are the three check-to-bit messages C1..C3 (6-bit sign-magnitude)
// and the channel value (5-bit sign-magnitude, same LSB weight). All four are
// converted to two's complement and combined into the three extrinsic sums
// new_Ci = channel + (sum of the other two messages), 8 bits wide. Each sum
// is converted back to sign-magnitude and clipped to magnitude 31. The hard
// decision is the MSB (sign) of the full sum channel + C1 + C2 + C3, i.e.
// 1 when the a-posteriori LLR is negative.
//
// With all three messages at zero the unit passes the channel value straight
// to its outputs: this is how channel values are written into the message
// memory at the start of a decoding run.
//
// PIPE = 1 (Code I) registers the three sums and C1 (BNU-PATH1 / BNU-PATH2
// split); outputs then follow the inputs by one clock. PIPE = 0 (Code II) is
// purely combinational. The datapath follows the decoder description; the
// saturation value on clipping is this design's own.
module bnu
  import ldpc_pkg::*;
#(
  parameter bit PIPE = 1'b0
) (
  input  logic clk,
  input  msg_t c_in [3],
  input  ch_t  ch,
  output msg_t c_out [3],
  output logic dec
);
  typedef logic signed [SUM_W-1:0] sum_t;

  function automatic sum_t sm2tc(input logic s, input logic [MAG_W-1:0] m);
    sum_t v = sum_t'({1'b0, m});
    return s ? -v : v;
  endfunction

  function automatic msg_t tc2sm_clip(input sum_t v);
    sum_t a = v[SUM_W-1] ? -v : v;
    mag_t m = (a > sum_t'(MAG_MAX)) ? mag_t'(MAG_MAX) : a[MAG_W-1:0];
    return {v[SUM_W-1] && (m != '0), m};
  endfunction

  sum_t t [3];
  sum_t tch;
  sum_t ext [3], ext_q [3];
  sum_t t0_q;

  always_comb begin
    for (int i = 0; i < 3; i++) t[i] = sm2tc(c_in[i][MSG_W-1], c_in[i][MAG_W-1:0]);
    tch    = sm2tc(ch[CH_W-1], {1'b0, ch[CH_W-2:0]});
    ext[0] = tch + t[1] + t[2];
    ext[1] = tch + t[0] + t[2];
    ext[2] = tch + t[0] + t[1];
  end

  if (PIPE) begin : g_pipe
    always_ff @(posedge clk) begin
      ext_q <= ext;
      t0_q  <= t[0];
    end
  end else begin : g_comb
    always_comb begin
      ext_q = ext;
      t0_q  = t[0];
    end
  end

  always_comb begin
    sum_t total;
    for (int i = 0; i < 3; i++) c_out[i] = tc2sm_clip(ext_q[i]);
    total = ext_q[0] + t0_q;
    dec   = total[SUM_W-1];
  end
endmodule
