// fong_adder: reconfigurable hybrid Ling carry-propagate adder, the final
// adder of the SWP MAC (a "Fong adder": sparse Ling parallel prefix plus
// 4-bit carry-select blocks).
//
// How it works:
//  * bit generators: g = a&b, t = a|b, d = a^b; the carry-in is merged into
//    bit 0 (g0' = g0 | t0&cin);
//  * Ling pairs at odd bits i: G*_i = g_i | g_(i-1), P*_i = t_(i-1) & t_(i-2),
//    so that the Ling pseudo-carry H_i = g_i | c_i obeys
//    H_i = G*_i | P*_i & H_(i-2);
//  * the pairs of bits 4k+1 and 4k+3 are merged into a 4-bit group, and a
//    Kogge-Stone prefix over the W/4 groups gives H at every bit 4k+3 only
//    (the sparse tree); the carry into bit 4k+4 is C = t_(4k+3) & H_(4k+3);
//  * bits 0..3 are a 4-bit ripple-carry adder fed by cin; every other 4-bit
//    block is a carry-select adder (sums for carry-in 0 and 1, picked by C).
// Sub-word operation: brk[k] breaks the carry chain between bit SEG*(k+1)-1
// and the bit above it. The g and t of that boundary bit are masked before
// they enter the Ling pairs and the group carry, so the carry into the next
// segment is zero while the sum bits below are unchanged; the carry-select
// block ending at the boundary still reports the segment's own carry-out in
// cout_seg[k]. cout is the carry out of bit W-1. In the MAC, W = 2N and
// SEG = 16 (one segment per 16-bit output lane) and brk is the kill vector.
// The gate-level cells of the published adder (three kinds of boundary
// cells, buffers for fan-out) are not copied; the masking above plays their
// part. Combinational.
module fong_adder #(
  parameter int unsigned W   = 64,
  parameter int unsigned SEG = 16
) (
  input  logic [W-1:0]       a,
  input  logic [W-1:0]       b,
  input  logic               cin,
  input  logic [W/SEG-2:0]   brk,
  output logic [W-1:0]       s,
  output logic [W/SEG-2:0]   cout_seg,
  output logic               cout
);

  localparam int K  = W / 4;                   // 4-bit blocks
  localparam int NS = W / SEG;                 // segments

  function automatic int clog2f(int x);
    int r;
    r = 0;
    while ((1 << r) < x) r++;
    return r;
  endfunction
  localparam int LV = clog2f(K);

  logic [W-1:0] g, t, d, gm, tm;

  always_comb begin
    g  = a & b;
    t  = a | b;
    d  = a ^ b;
    gm = g;
    tm = t;
    gm[0] = g[0] | (t[0] & cin);
    for (int k = 0; k < NS - 1; k++) begin
      gm[SEG*(k+1)-1] = g[SEG*(k+1)-1] & ~brk[k];
      tm[SEG*(k+1)-1] = t[SEG*(k+1)-1] & ~brk[k];
    end
  end

  // Ling pairs and 4-bit groups.
  logic [K-1:0] gg, pg;
  always_comb begin
    for (int k = 0; k < K; k++) begin
      logic gs1, ps1, gs3, ps3;
      gs1 = gm[4*k+1] | gm[4*k];
      ps1 = (k == 0) ? 1'b0 : (tm[4*k] & tm[(k == 0) ? 0 : 4*k-1]);
      gs3 = gm[4*k+3] | gm[4*k+2];
      ps3 = tm[4*k+2] & tm[4*k+1];
      gg[k] = gs3 | (ps3 & gs1);
      pg[k] = ps3 & ps1;
    end
  end

  // Kogge-Stone prefix over the groups: hh[LV][k] = H at bit 4k+3.
  logic [K-1:0] hh [LV+1];
  logic [K-1:0] pp [LV+1];
  assign hh[0] = gg;
  assign pp[0] = pg;
  for (genvar l = 0; l < LV; l++) begin : g_pfx
    for (genvar k = 0; k < K; k++) begin : g_node
      if (k >= (1 << l)) begin : g_op
        assign hh[l+1][k] = hh[l][k] | (pp[l][k] & hh[l][k - (1 << l)]);
        assign pp[l+1][k] = pp[l][k] & pp[l][k - (1 << l)];
      end else begin : g_buf
        assign hh[l+1][k] = hh[l][k];
        assign pp[l+1][k] = pp[l][k];
      end
    end
  end

  // Carry into every block: blk_c[k] is the carry into bit 4k.
  logic [K-1:0] blk_c;
  always_comb begin
    blk_c[0] = cin;
    for (int k = 1; k < K; k++) blk_c[k] = tm[4*k-1] & hh[LV][k-1];
  end

  // Sum blocks: ripple block 0, carry-select blocks above.
  logic [K-1:0] blk_co;
  always_comb begin
    for (int k = 0; k < K; k++) begin
      logic c0, c1;
      logic [3:0] s0, s1;
      c0 = (k == 0) ? cin : 1'b0;
      c1 = (k == 0) ? cin : 1'b1;
      for (int i = 0; i < 4; i++) begin
        s0[i] = d[4*k+i] ^ c0;
        s1[i] = d[4*k+i] ^ c1;
        c0 = g[4*k+i] | (t[4*k+i] & c0);
        c1 = g[4*k+i] | (t[4*k+i] & c1);
      end
      s[4*k +: 4] = blk_c[k] ? s1 : s0;
      blk_co[k]   = blk_c[k] ? c1 : c0;
    end
  end

  always_comb begin
    for (int k = 0; k < NS - 1; k++) cout_seg[k] = blk_co[(SEG*(k+1))/4 - 1];
    cout = t[W-1] & hh[LV][K-1];
  end

endmodule
