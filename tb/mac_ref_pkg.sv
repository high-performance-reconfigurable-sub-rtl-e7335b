// mac_ref_pkg: arithmetic reference model of the sub-word parallel MAC, used
// by the testbenches. It works from integer arithmetic only (no Booth
// encoding, no partial products) so it is independent of the RTL.
//
// Supports N = 16, 32, 64. Operands are passed in the low bits of 64/128-bit
// vectors; modes as 2 bits per 8-bit lane (lane 0 in bits 1:0).
package mac_ref_pkg;

  // Legal kill pattern: the lanes [lo, hi) are either one sub-word, or split
  // exactly in the middle into two legal halves.
  function automatic bit kill_legal(input logic [6:0] kill, input int lo, input int hi);
    int mid;
    if (hi - lo == 1) return 1'b1;
    mid = (lo + hi) / 2;
    if (kill[mid-1])
      return kill_legal(kill, lo, mid) && kill_legal(kill, mid, hi);
    for (int k = lo; k < hi - 1; k++)
      if (kill[k]) return 1'b0;
    return 1'b1;
  endfunction

  // Result of one MAC operation for an n-bit unit.
  function automatic logic [127:0] ref_mac(
    input int           n,
    input logic [63:0]  a,
    input logic [63:0]  y,
    input logic [127:0] acc,
    input logic [15:0]  modes,
    input logic [6:0]   kill,
    output bit          illegal
  );
    logic [127:0] res;
    logic [6:0]   kk;
    int nl, l;
    nl = n / 8;
    illegal = !kill_legal(kill, 0, nl);
    kk = illegal ? 7'd0 : kill;
    res = '0;
    l = 0;
    while (l < nl) begin
      int e, w, b;
      logic [1:0] md;
      logic signed [131:0] xv, yv, av, r;
      e = l;
      while (e < nl - 1 && !kk[e]) e++;
      w  = 8 * (e - l + 1);
      b  = 8 * l;
      md = modes[2*e +: 2];
      xv = '0;
      yv = '0;
      av = '0;
      for (int k = 0; k < 132; k++) begin
        if (k < w) begin
          xv[k] = a[b + k];
          yv[k] = y[b + k];
        end else begin
          xv[k] = (md[1] | md[0]) & a[b + w - 1];     // signed multiplicand
          yv[k] = (md == 2'b01)   & y[b + w - 1];     // signed multiplier
        end
        if (k < 2 * w) av[k] = acc[2*b + k];
      end
      r = xv * yv + av;
      for (int k = 0; k < 2 * w; k++) res[2*b + k] = r[k];
      l = e + 1;
    end
    return res;
  endfunction

endpackage
