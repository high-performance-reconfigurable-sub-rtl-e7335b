// mlier_prep: masking and multiplexing of the multiplier for the SWP MAC.
//
// Radix-4 Booth row i encodes the triplet {y[2i+1], y[2i], y[2i-1]}. In the
// document's scheme the same scalar encoders serve every sub-word mode; only
// the lowest row of each sub-word changes: its y[2i-1] is masked to the zero
// that sits right of a sub-word's LSB. The two extension bits {s,s} left of a
// sub-word's MSB m are not sent to an encoder: with s = m & tc & ~mix
// (Eq. 3.1) the extra triplet {s,s,m} is either +0 or +X, so it reduces to a
// one-bit select of the correction partial product (U_M) that adds the
// multiplicand once more when an unsigned multiplier has its MSB set
// (unsigned and mixed mode). That select is reported per lane, each lane
// carrying the value of its own sub-word.
//
// lane_lg and lane_mode come from sw_config. Purely combinational.
module mlier_prep
  import swp_mac_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]  mlier,
  input  logic [2:0]    lane_lg  [N/8],
  input  mac_mode_t     lane_mode[N/8],
  output logic [2:0]    trip     [N/2],   // Booth triplet of every row
  output logic          corr_sel [N/8]    // U_M select of the lane's sub-word
);

  localparam int NL = N / 8;

  always_comb begin
    for (int i = 0; i < N/2; i++) begin
      logic first;
      // Row i is the lowest of its sub-word when 2i is a multiple of the
      // sub-word width 8 << lane_lg.
      first  = ((2 * i) & ((8 << lane_lg[i/4]) - 1)) == 0;
      trip[i][2] = mlier[2*i+1];
      trip[i][1] = mlier[2*i];
      trip[i][0] = (first || i == 0) ? 1'b0 : mlier[(i == 0) ? 0 : 2*i-1];
    end
  end

  always_comb begin
    for (int l = 0; l < NL; l++) begin
      int swlanes, top;
      logic m, s;
      swlanes = 1 << lane_lg[l];
      top     = (l / swlanes) * swlanes + swlanes - 1;  // most significant lane
      if (top > NL - 1) top = NL - 1;
      m       = mlier[8*top + 7];
      s       = ext_bit(lane_mode[l], m);
      // Extra triplet {s,s,m}: +X when it is {0,0,1}, otherwise zero.
      corr_sel[l] = m & ~s;
    end
  end

endmodule
