// tb_swppa_row: checks single partial-product rows of the 32-bit array.
// Rows 0, 4 and 5 are built for random multiplicands, every Booth triplet,
// every mode and every sub-word size. Within the row's sub-word output field
// (2b .. 2b+2w-1) the row plus its hot-one bit must equal
//   (digit * X + C) * 4^j   mod 2^(2w)
// where X is the sub-word multiplicand (signed in signed/mixed mode), j the
// row's index in its sub-word and C the sign-encoding constant of the row
// (2^(w+3) for the first row, 3 * 2^(w+1) for the others). No bit may fall
// outside the field.
module tb_swppa_row;
  import swp_mac_pkg::*;
  int checks = 0, failures = 0;

  localparam int NROW = 3;
  localparam int ROWS [NROW] = '{0, 4, 5};

  mbe_sig_t    enc;
  logic [31:0] mcand;
  logic [2:0]  lane_lg;
  mac_mode_t   mode;
  logic [63:0] row [NROW], hot [NROW];

  for (genvar r = 0; r < NROW; r++) begin : g_dut
    swppa_row #(.N(32), .ROW(ROWS[r])) dut (.enc(enc), .mcand(mcand), .lane_lg(lane_lg),
      .lane_mode(mode), .row(row[r]), .hot(hot[r]));
  end

  localparam logic [3:0] TABLE [8] = '{4'b0101, 4'b1001, 4'b1000, 4'b0100,
                                       4'b0110, 4'b1010, 4'b1011, 4'b0111};

  initial begin
    for (int it = 0; it < 6000; it++) begin
      logic [2:0] t;
      int digit;
      t = 3'(it % 8);
      {enc.p1, enc.p2, enc.neg, enc.z} = TABLE[t];
      digit = -2 * int'(t[2]) + int'(t[1]) + int'(t[0]);
      mcand = $urandom;
      if (it % 5 == 0) mcand = 32'h8000_0080;
      lane_lg = 3'((it / 8) % 3);
      mode = 2'($urandom);
      #1;
      for (int r = 0; r < NROW; r++) begin
        int w, b, j;
        logic [63:0] mask, exp, got;
        logic signed [71:0] xv, v;
        w = 8 << lane_lg;
        b = ((2 * ROWS[r]) / w) * w;
        j = ROWS[r] - b / 2;
        xv = '0;
        for (int k = 0; k < 72; k++)
          xv[k] = (k < w) ? mcand[b + k] : ((mode[1] | mode[0]) & mcand[b + w - 1]);
        v = xv * digit + ((j == 0) ? (72'sd1 <<< (w + 3)) : (72'sd3 <<< (w + 1)));
        v = v <<< (2 * j);
        exp = '0;
        mask = '0;
        for (int k = 0; k < 2 * w; k++) begin
          exp[2*b + k]  = v[k];
          mask[2*b + k] = 1'b1;
        end
        got = (((row[r] & mask) >> (2*b)) + ((hot[r] & mask) >> (2*b))) << (2*b);
        got = got & mask;
        checks++;
        if (got !== exp || ((row[r] | hot[r]) & ~mask) !== '0) begin
          failures++;
          if (failures < 8)
            $display("FAIL row %0d t=%b lg=%0d mode=%b x=%h got %h exp %h", ROWS[r], t, lane_lg, mode, mcand, got, exp);
        end
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
