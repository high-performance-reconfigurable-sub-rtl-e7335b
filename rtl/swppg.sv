// swppg: sub-word parallel partial product generator (SWPPG).
//
// Produces the N/2 + 2 rows that the reduction tree adds:
//   rows 0 .. N/2-1 : Booth rows, one scalar race-free encoder (mbe_enc) and
//                     one row builder (swppa_row) per multiplier bit pair;
//   row  N/2        : U_M, the unsigned/mixed-mode correction row: for every
//                     sub-word whose select is set, its multiplicand field
//                     placed w bits above the sub-word's output base (the
//                     +X of the extra triplet {s,s,m}); the hot2 bits of all
//                     Booth rows share this row, in free columns below U_M;
//   row  N/2+1      : the accumulator, taken as is (each sub-word's field of
//                     accu lines up with its output field).
// The triplets and U_M selects come from mlier_prep; sub-word sizes and
// modes from sw_config. Folding hot2 into the U_M row is this design's
// choice; it keeps the array at the document's N/2 + 2 rows (17 rows plus the
// accumulator for N = 32). Combinational.
module swppg
  import swp_mac_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]    mcand,
  input  logic [2*N-1:0]  accu,
  input  logic [2:0]      trip     [N/2],
  input  logic            corr_sel [N/8],
  input  logic [2:0]      lane_lg  [N/8],
  input  mac_mode_t       lane_mode[N/8],
  output logic [2*N-1:0]  rows     [N/2+2]
);

  localparam int NL = N / 8;
  localparam int NR = N / 2;

  mbe_sig_t        enc     [NR];
  logic [2*N-1:0]  pp_row  [NR];
  logic [2*N-1:0]  pp_hot  [NR];

  for (genvar i = 0; i < NR; i++) begin : g_row
    mbe_enc u_enc (.trip(trip[i]), .enc(enc[i]));
    swppa_row #(.N(N), .ROW(i)) u_row (
      .enc      (enc[i]),
      .mcand    (mcand),
      .lane_lg  (lane_lg[i/4]),
      .lane_mode(lane_mode[i/4]),
      .row      (pp_row[i]),
      .hot      (pp_hot[i])
    );
    assign rows[i] = pp_row[i];
  end

  // Correction row U_M with the hot2 bits folded in.
  logic [2*N-1:0] um_row;
  always_comb begin
    um_row = '0;
    for (int l = 0; l < NL; l++) begin
      int swl, b, w;
      swl = 1 << lane_lg[l];
      if (swl > NL) swl = NL;
      b = 8 * ((l / swl) * swl);
      w = 8 * swl;
      if (corr_sel[l])
        for (int k = 0; k < 8; k++)
          um_row[b + w + 8*l + k] = mcand[8*l + k];
    end
    for (int i = 0; i < NR; i++) um_row = um_row | pp_hot[i];
  end

  assign rows[NR]   = um_row;
  assign rows[NR+1] = accu;

endmodule
