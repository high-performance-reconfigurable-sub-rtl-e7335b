// swp_mac: combinational sub-word parallel multiplier-accumulator.
//
// Computes, for every sub-word, m_out = accu + mcand * mlier in that
// sub-word's own mode (unsigned, signed or mixed). The N-bit operands are cut
// into 8-bit lanes; kill[k] = 1 separates lane k from lane k+1 and the lanes
// between kills form sub-words of 8, 16, 32 ... bits, each producing a 16,
// 32, 64 ... bit field of m_out from the same bits of accu. With kill = 0 it
// is the scalar N x N + 2N MAC. The flow is that of a Booth multiplier with
// the accumulator folded into the tree as one more row:
//
//   sw_config  : kill/mode pre-decoding, illegal patterns fall back to scalar
//   mlier_prep : Booth triplets, masked at sub-word boundaries, and the
//                unsigned/mixed correction selects
//   swppg      : race-free Booth encoders and the sub-word parallel partial
//                product array (sign encoding, hot-one modification, U_M
//                correction row, accumulator row)
//   swpprt     : delay-ordered full-adder tree, carry-out masking at lanes
//   fong_adder : Ling/carry-select final adder broken at the same boundaries
//
// Interface (N = 32): mcand[31:0], mlier[31:0], accu[63:0], mode_v[4] (one
// 2-bit mode per lane, the sub-word uses the mode of its top lane), kill[2:0];
// m_out[63:0]; cout_v[k] is the final adder's carry out of 16-bit output lane
// k (k = 0 .. N/8-2) and cout that of the top lane. These carries are the raw
// carry-outs of the final adder: the tree drops carries (and sign-encoding
// constants) at the same column, so they are not an overflow flag of
// accu + product by themselves. cfg_illegal reports a kill pattern that was
// replaced by scalar mode. Purely combinational, no clock.
module swp_mac
  import swp_mac_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]    mcand,
  input  logic [N-1:0]    mlier,
  input  logic [2*N-1:0]  accu,
  input  mac_mode_t       mode_v [N/8],
  input  logic [N/8-2:0]  kill,
  output logic [2*N-1:0]  m_out,
  output logic [N/8-2:0]  cout_v,
  output logic            cout,
  output logic            cfg_illegal
);

  localparam int NL = N / 8;
  localparam int NR = N / 2;

  initial begin
    assert (N >= 16 && (N & (N - 1)) == 0)
      else $error("swp_mac: N must be a power of two, at least 16");
  end

  logic [NL-2:0]  kill_eff;
  logic [2:0]     lane_lg   [NL];
  mac_mode_t      lane_mode [NL];
  logic [2:0]     trip      [NR];
  logic           corr_sel  [NL];
  logic [2*N-1:0] rows      [NR+2];
  logic [2*N-1:0] sum_row, carry_row;

  sw_config #(.N(N)) u_cfg (
    .kill       (kill),
    .mode_v     (mode_v),
    .kill_eff   (kill_eff),
    .cfg_illegal(cfg_illegal),
    .lane_lg    (lane_lg),
    .lane_mode  (lane_mode)
  );

  mlier_prep #(.N(N)) u_mlier (
    .mlier    (mlier),
    .lane_lg  (lane_lg),
    .lane_mode(lane_mode),
    .trip     (trip),
    .corr_sel (corr_sel)
  );

  swppg #(.N(N)) u_ppg (
    .mcand    (mcand),
    .accu     (accu),
    .trip     (trip),
    .corr_sel (corr_sel),
    .lane_lg  (lane_lg),
    .lane_mode(lane_mode),
    .rows     (rows)
  );

  swpprt #(.N(N)) u_prt (
    .rows     (rows),
    .kill     (kill_eff),
    .sum_row  (sum_row),
    .carry_row(carry_row)
  );

  fong_adder #(.W(2*N), .SEG(16)) u_cpa (
    .a       (sum_row),
    .b       (carry_row),
    .cin     (1'b0),
    .brk     (kill_eff),
    .s       (m_out),
    .cout_seg(cout_v),
    .cout    (cout)
  );

endmodule
