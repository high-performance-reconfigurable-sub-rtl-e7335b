// tb_sw_config: checks the kill/mode pre-decoder.
// 32-bit unit (default parameters): every kill pattern against the table of
// sub-word combinations ((32) (16,16) (8,8,8,8) (8,8,16) (16,8,8) legal,
// anything else falls back to scalar), expected lane sizes written out by
// hand. 64-bit unit: random patterns against the recursive legality rule of
// mac_ref_pkg. In both, every lane must carry the mode of its sub-word's top
// lane.
module tb_sw_config;
  import swp_mac_pkg::*;
  import mac_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [2:0]  k32;
  mac_mode_t   mv32 [4];
  logic [2:0]  ke32;
  logic        il32;
  logic [2:0]  lg32 [4];
  mac_mode_t   lm32 [4];
  sw_config dut32 (.kill(k32), .mode_v(mv32), .kill_eff(ke32), .cfg_illegal(il32),
                   .lane_lg(lg32), .lane_mode(lm32));

  logic [6:0]  k64;
  mac_mode_t   mv64 [8];
  logic [6:0]  ke64;
  logic        il64;
  logic [2:0]  lg64 [8];
  mac_mode_t   lm64 [8];
  sw_config #(.N(64)) dut64 (.kill(k64), .mode_v(mv64), .kill_eff(ke64), .cfg_illegal(il64),
                   .lane_lg(lg64), .lane_mode(lm64));

  // Expected log2 sizes of lanes 3..0 for kill patterns 0..7 ({kill2,kill1,kill0}).
  localparam logic [11:0] LG32 [8] = '{
    {3'd2, 3'd2, 3'd2, 3'd2},   // 000 (32)
    {3'd2, 3'd2, 3'd2, 3'd2},   // 001 illegal -> scalar
    {3'd1, 3'd1, 3'd1, 3'd1},   // 010 (16,16)
    {3'd1, 3'd1, 3'd0, 3'd0},   // 011 (16,8,8)
    {3'd2, 3'd2, 3'd2, 3'd2},   // 100 illegal
    {3'd2, 3'd2, 3'd2, 3'd2},   // 101 illegal
    {3'd0, 3'd0, 3'd1, 3'd1},   // 110 (8,8,16)
    {3'd0, 3'd0, 3'd0, 3'd0}};  // 111 (8,8,8,8)
  localparam logic [7:0] ILL32 = 8'b0011_0010;

  initial begin
    for (int it = 0; it < 400; it++) begin
      k32 = 3'(it % 8);
      for (int l = 0; l < 4; l++) mv32[l] = 2'($urandom);
      #1;
      checks++;
      if (il32 !== ILL32[k32] || ke32 !== (ILL32[k32] ? 3'b000 : k32)) begin
        failures++;
        $display("FAIL32 kill=%b illegal=%b kill_eff=%b", k32, il32, ke32);
      end
      for (int l = 0; l < 4; l++) begin
        int top;
        checks++;
        top = ((l >> LG32[k32][3*l +: 3]) << LG32[k32][3*l +: 3]) + (1 << LG32[k32][3*l +: 3]) - 1;
        if (lg32[l] !== LG32[k32][3*l +: 3] || lm32[l] !== mv32[top]) begin
          failures++;
          $display("FAIL32 kill=%b lane %0d lg=%0d mode=%b", k32, l, lg32[l], lm32[l]);
        end
      end
    end
    for (int it = 0; it < 2000; it++) begin
      bit ill;
      k64 = 7'($urandom);
      if (it % 3 == 0) k64[3] = 1'b1;
      if (it % 5 == 0) k64 = {k64[6], 1'b1, k64[6], 1'b1, k64[2], 1'b1, k64[2]};
      for (int l = 0; l < 8; l++) mv64[l] = 2'($urandom);
      #1;
      ill = !kill_legal(k64, 0, 8);
      checks++;
      if (il64 !== ill || ke64 !== (ill ? 7'd0 : k64)) begin
        failures++;
        $display("FAIL64 kill=%b illegal=%b", k64, il64);
      end
      for (int l = 0; l < 8; l++) begin
        int s, e;
        s = l;
        while (s > 0 && !ke64[s-1]) s--;
        e = l;
        while (e < 7 && !ke64[e]) e++;
        checks++;
        if ((1 << lg64[l]) !== e - s + 1 || lm64[l] !== mv64[e]) begin
          failures++;
          $display("FAIL64 kill=%b lane %0d lg=%0d", k64, l, lg64[l]);
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
