// swp_mac_pkg: types and helper functions shared by the sub-word parallel
// (SWP) multiplier-accumulator.
//
// Operating mode of one sub-word, two bits wide:
//   2'b00 unsigned   : multiplicand, multiplier and accumulator unsigned
//   2'b01 signed     : all operands two's complement
//   2'b1? mixed mode : signed multiplicand and accumulator, unsigned multiplier
// The encoding and the name of the two bits (mode[1] = mix, mode[0] = tc) follow
// the document. The basic sub-word is 8 input bits and 16 output bits; every
// sub-word is a power-of-two number of basic lanes aligned to its own size.
package swp_mac_pkg;

  typedef logic [1:0] mac_mode_t;

  localparam mac_mode_t MODE_UNSIGNED = 2'b00;
  localparam mac_mode_t MODE_SIGNED   = 2'b01;
  localparam mac_mode_t MODE_MIXED    = 2'b10;

  // Race-free modified Booth encoder outputs (one triplet).
  typedef struct packed {
    logic p1;   // select +-X (after correction by z)
    logic p2;   // select +-2X (zero when z is also set)
    logic neg;  // negative digit
    logic z;    // set when y[2i+1] == y[2i]
  } mbe_sig_t;

  // The multiplicand is read as signed in signed and in mixed mode.
  function automatic logic mcand_is_signed(mac_mode_t m);
    return m[1] | m[0];
  endfunction

  // Eq. (3.1): s = m & tc & ~mix, the bit that extends the multiplier of a
  // sub-word. m is the sub-word's multiplier MSB.
  function automatic logic ext_bit(mac_mode_t mode, logic m);
    return m & mode[0] & ~mode[1];
  endfunction

  // ceil(log2(x)) for x >= 1.
  function automatic int unsigned clog2i(int unsigned x);
    int unsigned r;
    r = 0;
    while ((1 << r) < x) r++;
    return r;
  endfunction

endpackage
