// swpprt: sub-word parallel partial product reduction tree (SWPPRT).
//
// Reduces the N/2 + 2 rows of the partial product array (Booth rows,
// U_M/hot-one row, accumulator) to two rows, sum and carry, for the final
// adder. The tree is a Wallace tree of full adders wired column by column
// with the three-dimensional method (TDM): every signal carries an estimated
// arrival time, and the adders of a column are formed greedily from the
// earliest signals available, the two earliest going to the slow inputs a
// and b and the latest of the three to the fast input cin. A column is done
// when two signals or fewer are left; its carries join the next column. So
// late carries from the right are absorbed by short cin paths instead of
// adding full levels, which is the point of the method.
//
// The wiring is computed at elaboration by the constant function tdm_table
// from the shape of the array (which columns of each Booth row can ever be
// non-zero, in any sub-word layout) and a unit delay model of the full
// adder: an XOR costs 2 and a NAND 1, so a->sum and b->sum take 4,
// cin->sum 2, a->cout and b->cout 4 (through the a^b term) and cin->cout 2.
// All tree inputs are taken to arrive at time 0, as for a reusable tree.
// These delay numbers are this design's assumption; with the delays of a
// real library cell only the delay constants in tdm_table change.
//
// Sub-word separation: every full adder of the top column of a 16-bit output
// lane (columns 16k+15) is an fa_cout_mask cell whose carry-out is zero while
// kill[k] is set. All carries into column 16k+16 come from those cells, so no
// carry of the tree crosses a sub-word boundary, and the masked cells can be
// wired as freely as any other. With kill all zero the tree is the scalar
// one. Carries out of the top column are dropped (the result is modulo
// 2^(2N)), so those adders leave cout unconnected. Combinational.
module swpprt
  import swp_mac_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [2*N-1:0] rows [N/2+2],
  input  logic [N/8-2:0] kill,
  output logic [2*N-1:0] sum_row,
  output logic [2*N-1:0] carry_row
);

  localparam int W    = 2 * N;
  localparam int NL   = N / 8;
  localparam int NR   = N / 2;            // Booth rows
  localparam int R0   = N / 2 + 2;        // all rows
  localparam int NIN  = R0 * W;           // input node ids: r * W + c
  localparam int IDW  = 16;               // bits of a node id
  localparam int NONE = (1 << IDW) - 1;   // "no signal" (constant 0)
  localparam int MAXP = 2 * R0 + 8;       // bound on signals in one column

  // Highest column row r can drive, over every sub-word size (the same
  // placement as swppa_row); the lowest is 2r. U_M and accu span the row.
  function automatic int row_top(int r);
    int top, w, b, p0, f, t;
    if (r >= NR) return W - 1;
    top = 0;
    for (int e = 0; (8 << e) <= N; e++) begin
      w  = 8 << e;
      b  = ((2 * r) / w) * w;
      p0 = b + 2 * r;
      f  = 2 * b + 2 * w;
      t  = (p0 + w + 3 < f - 1) ? p0 + w + 3 : f - 1;
      if (t > top) top = t;
    end
    return top;
  endfunction

  function automatic int row_bot(int r);
    return (r >= NR) ? 0 : 2 * r;
  endfunction

  // Number of full adders the greedy reduction places. Each adder turns
  // three signals of a column into one there and one in the next column.
  function automatic int count_fa();
    int n, cnt, carries;
    n = 0;
    carries = 0;
    for (int c = 0; c < W; c++) begin
      cnt = carries;
      for (int r = 0; r < R0; r++)
        if (c >= row_bot(r) && c <= row_top(r)) cnt++;
      carries = 0;
      while (cnt > 2) begin
        cnt = cnt - 2;
        carries++;
        n++;
      end
    end
    return n;
  endfunction

  localparam int NFA  = count_fa();
  localparam int FAW  = 4 * IDW;               // one adder: {column, cin, b, a}
  localparam int TABW = NFA * FAW + W * 2 * IDW;

  // Wiring table: for adder f, bits [f*FAW +: FAW] hold the node ids of its
  // a, b and cin and its column. After the adders come two node ids per
  // column for the final rows (NONE when a column has fewer than two signals
  // left). The sum of adder f is node NIN + 2f, its carry node NIN + 2f + 1.
  function automatic logic [TABW-1:0] tdm_table();
    logic [TABW-1:0]            tab;
    logic [MAXP-1:0][IDW-1:0]   pn, cn;    // column pool / next column carries
    logic [MAXP-1:0][15:0]      pt, ct;    // their arrival times
    logic [15:0]                tb, tc, t_sum;
    int np, nc, f, s0, s1, s2, hi;
    tab = TABW'(0);
    f   = 0;
    nc  = 0;
    for (int c = 0; c < W; c++) begin
      np = 0;
      for (int k = 0; k < nc; k++) begin
        pn[np] = cn[k];
        pt[np] = ct[k];
        np++;
      end
      for (int r = 0; r < R0; r++)
        if (c >= row_bot(r) && c <= row_top(r)) begin
          pn[np] = IDW'(r * W + c);
          pt[np] = '0;
          np++;
        end
      nc = 0;
      while (np > 2) begin
        // pick the three earliest signals (the first found wins a tie)
        s0 = 0;
        for (int k = 1; k < np; k++) if (pt[k] < pt[s0]) s0 = k;
        s1 = (s0 == 0) ? 1 : 0;
        for (int k = 0; k < np; k++) if (k != s0 && pt[k] < pt[s1]) s1 = k;
        s2 = -1;
        for (int k = 0; k < np; k++)
          if (k != s0 && k != s1 && (s2 < 0 || pt[k] < pt[s2])) s2 = k;
        tb = pt[s1];
        tc = pt[s2];
        tab[f*FAW          +: IDW] = pn[s0];        // a
        tab[f*FAW + IDW    +: IDW] = pn[s1];        // b
        tab[f*FAW + 2*IDW  +: IDW] = pn[s2];        // cin
        tab[f*FAW + 3*IDW  +: IDW] = IDW'(c);       // column
        // a, b -> sum/cout 4, cin -> sum/cout 2; pt[s0] <= pt[s1]
        t_sum = (tb + 16'd4 > tc + 16'd2) ? tb + 16'd4 : tc + 16'd2;
        // remove the three, highest position first, then add the sum
        for (int j = 0; j < 3; j++) begin
          hi = s0;
          if (s1 > hi) hi = s1;
          if (s2 > hi) hi = s2;
          for (int k = hi; k < np - 1; k++) begin
            pn[k] = pn[k+1];
            pt[k] = pt[k+1];
          end
          np--;
          if (s0 == hi) s0 = -1;
          else if (s1 == hi) s1 = -1;
          else s2 = -1;
        end
        pn[np] = IDW'(NIN + 2 * f);
        pt[np] = t_sum;
        np++;
        cn[nc] = IDW'(NIN + 2 * f + 1);
        ct[nc] = t_sum;
        nc++;
        f++;
      end
      tab[NFA*FAW + (2*c)*IDW   +: IDW] = (np > 0) ? pn[0] : IDW'(NONE);
      tab[NFA*FAW + (2*c+1)*IDW +: IDW] = (np > 1) ? pn[1] : IDW'(NONE);
    end
    return tab;
  endfunction

  localparam logic [TABW-1:0] TAB = tdm_table();

  for (genvar f = 0; f < NFA; f++) begin : g_fa
    logic [2:0] in3;
    logic       s, co;
    for (genvar j = 0; j < 3; j++) begin : g_in
      localparam int SRC = int'(TAB[f*FAW + j*IDW +: IDW]);
      if (SRC < NIN) begin : g_row
        assign in3[j] = rows[SRC / W][SRC % W];
      end else if ((SRC - NIN) % 2 == 0) begin : g_sum
        assign in3[j] = g_fa[(SRC - NIN) / 2].s;
      end else begin : g_co
        assign in3[j] = g_fa[(SRC - NIN) / 2].co;
      end
    end
    localparam int COL = int'(TAB[f*FAW + 3*IDW +: IDW]);
    if (COL % 16 == 15 && COL / 16 < NL - 1) begin : g_mask
      fa_cout_mask u_fa (.a(in3[0]), .b(in3[1]), .cin(in3[2]), .kill(kill[COL / 16]),
                         .sum(s), .cout(co));
    end else begin : g_plain
      full_adder u_fa (.a(in3[0]), .b(in3[1]), .cin(in3[2]), .sum(s), .cout(co));
    end
  end

  for (genvar c = 0; c < W; c++) begin : g_out
    localparam int S0 = int'(TAB[NFA*FAW + (2*c)*IDW   +: IDW]);
    localparam int S1 = int'(TAB[NFA*FAW + (2*c+1)*IDW +: IDW]);
    if (S0 == NONE) begin : g_s_none
      assign sum_row[c] = 1'b0;
    end else if (S0 < NIN) begin : g_s_row
      assign sum_row[c] = rows[S0 / W][S0 % W];
    end else if ((S0 - NIN) % 2 == 0) begin : g_s_sum
      assign sum_row[c] = g_fa[(S0 - NIN) / 2].s;
    end else begin : g_s_co
      assign sum_row[c] = g_fa[(S0 - NIN) / 2].co;
    end
    if (S1 == NONE) begin : g_c_none
      assign carry_row[c] = 1'b0;
    end else if (S1 < NIN) begin : g_c_row
      assign carry_row[c] = rows[S1 / W][S1 % W];
    end else if ((S1 - NIN) % 2 == 0) begin : g_c_sum
      assign carry_row[c] = g_fa[(S1 - NIN) / 2].s;
    end else begin : g_c_co
      assign carry_row[c] = g_fa[(S1 - NIN) / 2].co;
    end
  end

endmodule
