// swppa_row: one Booth partial-product row of the sub-word parallel partial
// product array (SWPPA), with its sign-encoding and hot-one bits.
//
// Row ROW multiplies the multiplicand field of its sub-word by the Booth digit
// of triplet ROW and sits at output bit b + 2*ROW, where b is the sub-word's
// first input bit. This places its significant bits on the same columns in
// every sub-word mode, which is what lets all modes share one array; only the
// bits near sub-word boundaries differ between modes. The block builds the row
// once for every sub-word size the lane can belong to (8, 16, ... N bits) and
// a multiplexer picks the one for the lane's current size, the AND2/MUX2/MUX3
// selection of the document's selection example reduced to a single select.
//
// Per candidate of width w (b = sub-word base, j = ROW - b/2):
//  * the multiplicand field is extended by one bit (sign in signed and mixed
//    mode, zero in unsigned mode) and decoded with the race-free signals
//    into a (w+2)-bit partial product pp, inverted for negative digits;
//    pp[w+1] is the sign n of the row, pp[w] the "t" bit (Fig. 3.2, Table 3.4);
//  * sign encoding replaces the sign extension: {p,n,n} above the first row
//    of a sub-word and {1,p} above the others, p = ~n; the constants these
//    add sum to a multiple of 2^(2w), outside the sub-word's output field;
//  * hot-one modification (Table 2.5): the two's-complement "+1" of a
//    negative row and the row's LSB are summed into LSB_new (kept in the row)
//    and hot2, returned in hot at bit b + 2*ROW + 1, one column left of the
//    row's LSB, where the next row (or the correction row) has a free slot.
// Bits above the sub-word's output field (2b + 2w and up) are dropped.
// Combinational.
module swppa_row
  import swp_mac_pkg::*;
#(
  parameter int unsigned N   = 32,
  parameter int unsigned ROW = 0
) (
  input  mbe_sig_t        enc,        // encoded triplet of this row
  input  logic [N-1:0]    mcand,
  input  logic [2:0]      lane_lg,    // log2 of sub-word size in lanes
  input  mac_mode_t       lane_mode,  // mode of the row's sub-word
  output logic [2*N-1:0]  row,
  output logic [2*N-1:0]  hot
);

  localparam int NL = N / 8;
  localparam int NE = clog2i(NL) + 1;   // candidate sub-word sizes
  localparam int SW = clog2i(NE);       // width of the candidate select

  logic [2*N-1:0] cand_row [NE];
  logic [2*N-1:0] cand_hot [NE];

  // Digit decoding shared by all candidates.
  logic sel1, sel2, negf;
  always_comb begin
    sel1 = enc.p1;
    sel2 = enc.p2 & ~enc.z;
    negf = enc.neg & ~(enc.p2 & enc.z);   // 111 is -0: no inversion
  end

  for (genvar e = 0; e < NE; e++) begin : g_cand
    localparam int W  = 8 << e;                 // sub-word input width
    localparam int B  = ((2 * ROW) / W) * W;    // sub-word first input bit
    localparam int J  = ROW - B / 2;            // row index within sub-word
    localparam int P0 = B + 2 * ROW;            // output column of the LSB
    localparam int F  = 2 * B + 2 * W;          // end of sub-word output field

    logic [W:0]   x_ext;
    logic [W+1:0] pp;
    logic         n, lsb_new, hot2;

    always_comb begin
      x_ext = {mcand_is_signed(lane_mode) & mcand[B+W-1], mcand[B +: W]};
      for (int k = 0; k <= W + 1; k++) begin
        logic xk, xkm1;
        xk   = x_ext[(k <= W) ? k : W];
        xkm1 = (k == 0) ? 1'b0 : x_ext[(k - 1 <= W) ? k - 1 : W];
        pp[k] = ((sel1 & xk) | (sel2 & xkm1)) ^ negf;
      end
      n = pp[W+1];
      {hot2, lsb_new} = {1'b0, pp[0]} + {1'b0, negf};

      cand_row[e] = '0;
      cand_hot[e] = '0;
      cand_row[e][P0] = lsb_new;
      for (int k = 1; k <= W; k++)
        if (P0 + k < F) cand_row[e][P0+k] = pp[k];
      if (J == 0) begin
        if (P0 + W + 1 < F) cand_row[e][P0+W+1] = n;
        if (P0 + W + 2 < F) cand_row[e][P0+W+2] = n;
        if (P0 + W + 3 < F) cand_row[e][P0+W+3] = ~n;
      end else begin
        if (P0 + W + 1 < F) cand_row[e][P0+W+1] = ~n;
        if (P0 + W + 2 < F) cand_row[e][P0+W+2] = 1'b1;
      end
      cand_hot[e][P0+1] = hot2;
    end
  end

  logic [SW-1:0] sel;
  always_comb begin
    sel = (int'(lane_lg) < NE) ? SW'(lane_lg) : SW'(NE - 1);
    row = cand_row[sel];
    hot = cand_hot[sel];
  end

endmodule
