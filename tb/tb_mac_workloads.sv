// tb_mac_workloads: runs the evaluation workloads on the registered MAC unit
// at three sizes, N = 16, 32 (default) and 64:
//   * 10,000 random operations with every unit in its all-8-bit sub-word
//     layout and random per-sub-word modes (the power-measurement stimulus);
//   * 2,000 random scalar operations per unit, in all three modes;
//   * accumulation chains of 16 operations with the feedback path, scalar
//     and 8-bit layouts alternating.
// Each result is compared, one cycle after issue, with the integer model of
// mac_ref_pkg. Operations issue back to back, one per clock.
module tb_mac_workloads;
  import swp_mac_pkg::*;
  import mac_ref_pkg::*;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, in_valid = 0, acc_fb = 0;
  logic [63:0]  a = '0, y = '0;
  logic [127:0] acc = '0;
  logic [15:0]  modes = '0;
  logic [6:0]   kill = '0;

  always #5 clk = ~clk;

  mac_mode_t m16 [2], m32 [4], m64 [8];
  always_comb begin
    for (int l = 0; l < 2; l++) m16[l] = modes[2*l +: 2];
    for (int l = 0; l < 4; l++) m32[l] = modes[2*l +: 2];
    for (int l = 0; l < 8; l++) m64[l] = modes[2*l +: 2];
  end

  logic v16, v32, v64, c16, c32, c64, i16, i32, i64;
  logic [31:0] o16; logic [63:0] o32; logic [127:0] o64;
  logic [0:0] cv16; logic [2:0] cv32; logic [6:0] cv64;

  swp_mac_unit #(.N(16)) u16 (.clk, .rst_n, .in_valid, .acc_fb, .mcand(a[15:0]), .mlier(y[15:0]),
    .accu(acc[31:0]), .mode_v(m16), .kill(kill[0:0]), .out_valid(v16), .m_out(o16),
    .cout_v(cv16), .cout(c16), .cfg_illegal(i16));
  swp_mac_unit u32 (.clk, .rst_n, .in_valid, .acc_fb, .mcand(a[31:0]), .mlier(y[31:0]),
    .accu(acc[63:0]), .mode_v(m32), .kill(kill[2:0]), .out_valid(v32), .m_out(o32),
    .cout_v(cv32), .cout(c32), .cfg_illegal(i32));
  swp_mac_unit #(.N(64)) u64 (.clk, .rst_n, .in_valid, .acc_fb, .mcand(a), .mlier(y),
    .accu(acc), .mode_v(m64), .kill(kill), .out_valid(v64), .m_out(o64),
    .cout_v(cv64), .cout(c64), .cfg_illegal(i64));

  logic [31:0] e16; logic [63:0] e32; logic [127:0] e64;

  task automatic issue();
    logic [127:0] r;
    bit ill;
    r = ref_mac(16, a, y, acc_fb ? {96'b0, e16} : acc, modes, {6'b0, kill[0]}, ill);
    e16 = r[31:0];
    r = ref_mac(32, a, y, acc_fb ? {64'b0, e32} : acc, modes, {4'b0, kill[2:0]}, ill);
    e32 = r[63:0];
    r = ref_mac(64, a, y, acc_fb ? e64 : acc, modes, kill, ill);
    e64 = r;
    in_valid = 1;
    @(posedge clk);
    #1;
    checks += 3;
    if (!v16 || o16 !== e16) begin
      failures++;
      if (failures < 8) $display("FAIL N16 k=%b md=%h got %h exp %h", kill[0], modes, o16, e16);
    end
    if (!v32 || o32 !== e32) begin
      failures++;
      if (failures < 8) $display("FAIL N32 k=%b md=%h got %h exp %h", kill[2:0], modes, o32, e32);
    end
    if (!v64 || o64 !== e64) begin
      failures++;
      if (failures < 8) $display("FAIL N64 k=%b md=%h got %h exp %h", kill, modes, o64, e64);
    end
  endtask

  task automatic rand_ops();
    a = {$urandom, $urandom};
    y = {$urandom, $urandom};
    acc = {$urandom, $urandom, $urandom, $urandom};
  endtask

  initial begin
    e16 = '0; e32 = '0; e64 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // power stimulus: all units in all-8-bit layout
    kill = '1;
    acc_fb = 0;
    for (int it = 0; it < 10000; it++) begin
      rand_ops();
      modes = 16'($urandom);
      issue();
    end
    // scalar operation in each mode
    kill = '0;
    for (int it = 0; it < 2000; it++) begin
      rand_ops();
      modes = {8{2'(it % 3)}};
      issue();
    end
    // accumulation chains
    for (int ch = 0; ch < 20; ch++) begin
      kill = (ch % 2) ? '1 : '0;
      modes = {8{2'(ch % 3)}};
      acc_fb = 0;
      rand_ops();
      issue();
      acc_fb = 1;
      for (int k = 0; k < 15; k++) begin
        rand_ops();
        issue();
      end
    end
    in_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
