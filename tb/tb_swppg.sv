// tb_swppg: checks the whole partial product array of the 32-bit unit.
// For every sub-word, the sum of all N/2 + 2 rows restricted to its output
// field, modulo 2^(2w), must equal accu + mcand * mlier of that sub-word in
// its mode (mac_ref_pkg). Sub-word sizes, modes, triplets and correction
// selects come from sw_config and mlier_prep.
module tb_swppg;
  import swp_mac_pkg::*;
  import mac_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [31:0] mcand, mlier;
  logic [63:0] accu;
  logic [2:0]  kill, kill_eff;
  mac_mode_t   mode_v [4], lane_mode [4];
  logic [2:0]  lane_lg [4];
  logic        ill;
  logic [2:0]  trip [16];
  logic        corr_sel [4];
  logic [63:0] rows [18];

  sw_config  u_cfg (.kill(kill), .mode_v(mode_v), .kill_eff(kill_eff), .cfg_illegal(ill),
                    .lane_lg(lane_lg), .lane_mode(lane_mode));
  mlier_prep u_mp  (.mlier(mlier), .lane_lg(lane_lg), .lane_mode(lane_mode),
                    .trip(trip), .corr_sel(corr_sel));
  swppg      dut   (.mcand(mcand), .accu(accu), .trip(trip), .corr_sel(corr_sel),
                    .lane_lg(lane_lg), .lane_mode(lane_mode), .rows(rows));

  initial begin
    for (int it = 0; it < 4000; it++) begin
      logic [127:0] exp;
      logic [15:0]  modes;
      bit illegal;
      kill  = 3'(it % 8);
      mcand = $urandom;
      mlier = $urandom;
      if (it % 6 == 0) begin mcand = 32'h8080_8080; mlier = 32'hff80_7f01; end
      accu  = {$urandom, $urandom};
      for (int l = 0; l < 4; l++) mode_v[l] = 2'($urandom);
      modes = {8'b0, mode_v[3], mode_v[2], mode_v[1], mode_v[0]};
      #1;
      exp = ref_mac(32, {32'b0, mcand}, {32'b0, mlier}, {64'b0, accu}, modes, {4'b0, kill}, illegal);
      for (int l = 0; l < 4; ) begin
        int e, w, b;
        logic [63:0] fs;
        e = l;
        while (e < 3 && !kill_eff[e]) e++;
        w = 8 * (e - l + 1);
        b = 8 * l;
        fs = '0;
        for (int r = 0; r < 18; r++) begin
          logic [63:0] f;
          f = '0;
          for (int k = 0; k < 2 * w; k++) f[k] = rows[r][2*b + k];
          fs += f;
        end
        checks++;
        for (int k = 0; k < 2 * w; k++)
          if (fs[k] !== exp[2*b + k]) begin
            failures++;
            if (failures < 8) $display("FAIL kill=%b lane %0d bit %0d", kill, l, k);
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
