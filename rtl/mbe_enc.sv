// mbe_enc: race-free radix-4 modified Booth encoder for one triplet.
//
// Implements the race-free truth table of the document (Table 2.4):
//   p1  = y[2i] ^ y[2i-1]          select X
//   p2  = ~p1                      select 2X (overridden to zero by z)
//   neg = y[2i+1]                  negative digit
//   z   = ~(y[2i+1] ^ y[2i])       set for 000, 001, 110, 111
// The signals are deliberately "wrong" for some triplets (000 and 111 raise
// p2); the decoder in swppa_row corrects them with z, which gives the digit
// of the plain modified Booth table (Table 2.1). The gate-level encoder of
// the cited implementation is not reproduced; this is its truth table.
// Combinational.
module mbe_enc
  import swp_mac_pkg::*;
(
  input  logic [2:0] trip,   // {y[2i+1], y[2i], y[2i-1]}
  output mbe_sig_t   enc
);

  always_comb begin
    enc.p1  = trip[1] ^ trip[0];
    enc.p2  = ~(trip[1] ^ trip[0]);
    enc.neg = trip[2];
    enc.z   = ~(trip[2] ^ trip[1]);
  end

endmodule
