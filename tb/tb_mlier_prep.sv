// tb_mlier_prep: checks the multiplier preprocessing of the 32-bit unit.
// For every sub-word the Booth digits of its rows, weighted by 4^j, plus the
// correction select weighted by 2^w must give back the sub-word's multiplier:
// its signed value in signed mode, its unsigned value in unsigned and mixed
// mode. Sub-word sizes and modes come from sw_config driven with every legal
// kill pattern; digits are decoded straight from the triplets.
module tb_mlier_prep;
  import swp_mac_pkg::*;
  int checks = 0, failures = 0;

  logic [31:0] mlier;
  logic [2:0]  kill, kill_eff;
  mac_mode_t   mode_v [4], lane_mode [4];
  logic [2:0]  lane_lg [4];
  logic        ill;
  logic [2:0]  trip [16];
  logic        corr_sel [4];

  sw_config  u_cfg (.kill(kill), .mode_v(mode_v), .kill_eff(kill_eff), .cfg_illegal(ill),
                    .lane_lg(lane_lg), .lane_mode(lane_mode));
  mlier_prep dut   (.mlier(mlier), .lane_lg(lane_lg), .lane_mode(lane_mode),
                    .trip(trip), .corr_sel(corr_sel));

  localparam logic [2:0] LEGAL [5] = '{3'b000, 3'b010, 3'b111, 3'b110, 3'b011};

  initial begin
    for (int it = 0; it < 3000; it++) begin
      kill  = LEGAL[it % 5];
      mlier = $urandom;
      if (it % 7 == 0) mlier = 32'h8080_8080 | (32'($urandom) & 32'h0f0f_0f0f);
      for (int l = 0; l < 4; l++) mode_v[l] = 2'($urandom);
      #1;
      for (int l = 0; l < 4; ) begin
        int e, w, b;
        longint yv, acc;
        logic [1:0] md;
        e = l;
        while (e < 3 && !kill[e]) e++;
        w = 8 * (e - l + 1);
        b = 8 * l;
        md = mode_v[e];
        yv = 0;
        for (int k = 0; k < w; k++) if (mlier[b + k]) yv += longint'(1) << k;
        if (md == 2'b01 && mlier[b + w - 1]) yv -= longint'(1) << w;
        acc = 0;
        for (int j = 0; j < w / 2; j++) begin
          logic [2:0] t;
          t = trip[b/2 + j];
          acc += longint'(-2 * int'(t[2]) + int'(t[1]) + int'(t[0])) <<< (2 * j);
          checks++;
          if (t[2:1] !== mlier[b + 2*j +: 2] || (j == 0 && t[0] !== 1'b0)) begin
            failures++;
            $display("FAIL triplet row %0d kill=%b", b/2 + j, kill);
          end
        end
        if (corr_sel[l]) acc += longint'(1) << w;
        checks++;
        if (acc !== yv) begin
          failures++;
          $display("FAIL kill=%b lane %0d mode=%b y=%h got %0d exp %0d", kill, l, md, mlier, acc, yv);
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
