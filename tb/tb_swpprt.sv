// tb_swpprt: checks the reduction tree of the 32-bit unit (18 rows of 64
// bits). Rows are random, kill is random. Within each field between killed
// lane boundaries, sum_row + carry_row must equal the sum of the 18 input
// rows modulo 2^(field width); with kill all zero this is the scalar tree.
// Booth row r only ever drives the columns a row of its index can reach in
// some sub-word size w (8, 16, 32): from b + 2r up to the smaller of
// b + 2r + w + 3 and the top of the 2w-bit field at 2b, where b is the first
// input bit of the sub-word holding triplet r. The random rows are masked to
// those columns; the correction row and the accumulator row are full.
module tb_swpprt;
  int checks = 0, failures = 0;

  logic [63:0] rows [18];
  logic [2:0]  kill;
  logic [63:0] s, c;

  function automatic logic [63:0] reach(input int r);
    logic [63:0] m;
    m = '0;
    for (int w = 8; w <= 32; w *= 2) begin
      int b, lo, hi;
      b  = ((2 * r) / w) * w;
      lo = b + 2 * r;
      hi = b + 2 * r + w + 3;
      if (hi > 2 * b + 2 * w - 1) hi = 2 * b + 2 * w - 1;
      for (int c = lo; c <= hi; c++) m[c] = 1'b1;
    end
    return m;
  endfunction

  swpprt dut (.rows(rows), .kill(kill), .sum_row(s), .carry_row(c));

  initial begin
    for (int it = 0; it < 4000; it++) begin
      kill = 3'($urandom);
      for (int r = 0; r < 18; r++) rows[r] = {$urandom, $urandom};
      if (it % 4 == 0) for (int r = 0; r < 18; r++) rows[r] = '1;
      for (int r = 0; r < 16; r++) rows[r] &= reach(r);
      #1;
      for (int l = 0; l < 4; ) begin
        int e, lo, wd;
        logic [63:0] fin, fout, f;
        e = l;
        while (e < 3 && !kill[e]) e++;
        lo = 16 * l;
        wd = 16 * (e - l + 1);
        fin = '0;
        for (int r = 0; r < 18; r++) begin
          f = '0;
          for (int k = 0; k < wd; k++) f[k] = rows[r][lo + k];
          fin += f;
        end
        fout = '0;
        f = '0;
        for (int k = 0; k < wd; k++) begin
          fout[k] = s[lo + k];
          f[k]    = c[lo + k];
        end
        fout += f;
        checks++;
        for (int k = 0; k < wd; k++)
          if (fout[k] !== fin[k]) begin
            failures++;
            if (failures < 8) $display("FAIL kill=%b field at %0d", kill, lo);
            break;
          end
        l = e + 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
