// tb_swp_mac: self-checking testbench of the combinational SWP MAC core.
//
// Three cores run side by side, N = 16, 32 (the default) and 64, on the same
// stimulus: every kill pattern of the 16- and 32-bit units, the legal and a
// few illegal patterns of the 64-bit unit, random and corner operands, and
// random per-lane modes (sometimes one mode per sub-word as the interface
// asks, sometimes independent per lane). m_out and cfg_illegal are compared
// with mac_ref_pkg, an integer model. A watchdog ends the run.
module tb_swp_mac;
  import swp_mac_pkg::*;
  import mac_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [63:0]  a, y;
  logic [127:0] acc;
  logic [15:0]  modes;
  logic [6:0]   kill;

  // N = 16
  mac_mode_t m16 [2];
  logic [31:0] o16; logic [0:0] cv16; logic c16, il16;
  swp_mac #(.N(16)) u16 (.mcand(a[15:0]), .mlier(y[15:0]), .accu(acc[31:0]),
    .mode_v(m16), .kill(kill[0:0]), .m_out(o16), .cout_v(cv16), .cout(c16),
    .cfg_illegal(il16));
  // N = 32 (default parameters)
  mac_mode_t m32 [4];
  logic [63:0] o32; logic [2:0] cv32; logic c32, il32;
  swp_mac u32 (.mcand(a[31:0]), .mlier(y[31:0]), .accu(acc[63:0]),
    .mode_v(m32), .kill(kill[2:0]), .m_out(o32), .cout_v(cv32), .cout(c32),
    .cfg_illegal(il32));
  // N = 64
  mac_mode_t m64 [8];
  logic [127:0] o64; logic [6:0] cv64; logic c64, il64;
  swp_mac #(.N(64)) u64 (.mcand(a), .mlier(y), .accu(acc),
    .mode_v(m64), .kill(kill), .m_out(o64), .cout_v(cv64), .cout(c64),
    .cfg_illegal(il64));

  always_comb begin
    for (int l = 0; l < 2; l++) m16[l] = modes[2*l +: 2];
    for (int l = 0; l < 4; l++) m32[l] = modes[2*l +: 2];
    for (int l = 0; l < 8; l++) m64[l] = modes[2*l +: 2];
  end

  task automatic check_all(input int lim);
    logic [127:0] exp;
    bit ill;
    #1;
    if (lim >= 16) begin
      exp = ref_mac(16, a, y, acc, modes, {6'b0, kill[0]}, ill);
      checks++;
      if (o16 !== exp[31:0] || il16 !== ill) begin
        failures++;
        if (failures < 10) $display("FAIL N16 a=%h y=%h acc=%h md=%b k=%b got %h exp %h", a[15:0], y[15:0], acc[31:0], modes[3:0], kill[0], o16, exp[31:0]);
      end
    end
    if (lim >= 32) begin
      exp = ref_mac(32, a, y, acc, modes, {4'b0, kill[2:0]}, ill);
      checks++;
      if (o32 !== exp[63:0] || il32 !== ill) begin
        failures++;
        if (failures < 10) $display("FAIL N32 a=%h y=%h acc=%h md=%b k=%b got %h exp %h", a[31:0], y[31:0], acc[63:0], modes[7:0], kill[2:0], o32, exp[63:0]);
      end
    end
    if (lim >= 64) begin
      exp = ref_mac(64, a, y, acc, modes, kill, ill);
      checks++;
      if (o64 !== exp || il64 !== ill) begin
        failures++;
        if (failures < 10) $display("FAIL N64 a=%h y=%h md=%b k=%b got %h exp %h", a, y, modes, kill, o64, exp);
      end
    end
  endtask

  function automatic logic [7:0] corner(input int sel);
    case (sel % 6)
      0: return 8'h00;
      1: return 8'h01;
      2: return 8'h7f;
      3: return 8'h80;
      4: return 8'hff;
      default: return 8'($urandom);
    endcase
  endfunction

  // Legal 64-bit kill patterns: a scalar 64-bit word or two 32-bit halves.
  localparam logic [2:0] K32 [5] = '{3'b000, 3'b010, 3'b111, 3'b110, 3'b011};

  initial begin
    // exhaustive-ish: every 32-bit kill pattern, modes per lane random
    for (int it = 0; it < 4000; it++) begin
      int kind;
      kind = it % 4;
      for (int l = 0; l < 8; l++) begin
        a[8*l +: 8] = (kind == 0) ? corner($urandom) : 8'($urandom);
        y[8*l +: 8] = (kind == 0) ? corner($urandom) : 8'($urandom);
      end
      acc = {$urandom, $urandom, $urandom, $urandom};
      if (kind == 1) acc = '0;
      modes = 16'($urandom);
      if (it < 3000) begin
        kill[2:0] = 3'(it % 8);
        if ((it / 8) % 4 == 0) kill[6:3] = 4'b0000;
        else kill[6:3] = {K32[$urandom % 5], 1'b1};
        if ((it / 8) % 9 == 5) kill[6:3] = 4'($urandom);
      end else begin
        kill = 7'($urandom);
      end
      check_all(64);
    end
    // all-mode sweep on the 32-bit unit: same mode in all lanes
    for (int md = 0; md < 4; md++)
      for (int k = 0; k < 5; k++)
        for (int it = 0; it < 50; it++) begin
          a = {$urandom, $urandom}; y = {$urandom, $urandom};
          acc = {$urandom, $urandom, $urandom, $urandom};
          modes = {8{2'(md)}};
          kill = {4'b0, K32[k]};
          check_all(64);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
