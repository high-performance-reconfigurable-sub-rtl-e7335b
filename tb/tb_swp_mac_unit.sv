// tb_swp_mac_unit: end-to-end testbench of the registered SWP MAC at its
// default size (N = 32, no parameter override), so it is also the full-size
// test.
//
// A model register tracks what m_out and cfg_illegal must hold after every
// clock: reset clears it, an operation with in_valid updates it with
// mac_ref_pkg::ref_mac one cycle later, and in_valid low leaves it alone. The
// accumulator is either the accu port or, with acc_fb, the previous result,
// which the stimulus uses for chains of multiply-accumulates.
//
// Every mechanism of the design is counted when it is seen doing work, and a
// mechanism with a zero count is a failure:
//   scalar 32-bit, (16,16), (8,8,8,8), (8,8,16), (16,8,8) sub-word layouts,
//   illegal layout falling back to scalar, unsigned / signed / mixed mode,
//   different modes in one operation, accumulate feedback, a kill that
//   blocks a final-adder carry at a sub-word boundary, the top carry-out,
//   the result hold with in_valid low, and reset.
// cout_v and cout are raw carries of the final adder, whose split between the
// sum and carry rows of the tree the integer model does not know, so only
// their occurrence is counted, not their value.
module tb_swp_mac_unit;
  import swp_mac_pkg::*;
  import mac_ref_pkg::*;

  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0, in_valid = 0, acc_fb = 0;
  logic [31:0] mcand = '0, mlier = '0;
  logic [63:0] accu = '0;
  mac_mode_t   mode_v [4];
  logic [2:0]  kill = '0;
  logic        out_valid, cout, cfg_illegal;
  logic [63:0] m_out;
  logic [2:0]  cout_v;

  swp_mac_unit dut (.*);

  always #5 clk = ~clk;

  // expected state
  logic [63:0] exp_out;
  logic        exp_ill, exp_valid;

  // mechanism counters
  localparam int M_SCALAR = 0, M_16_16 = 1, M_8X4 = 2, M_8_8_16 = 3, M_16_8_8 = 4,
                 M_ILLEGAL = 5, M_UNS = 6, M_SGN = 7, M_MIX = 8, M_PERSW = 9,
                 M_ACCFB = 10, M_KILLC = 11, M_COUT = 12, M_HOLD = 13, M_RESET = 14,
                 NM = 15;
  int seen [NM];
  string names [NM] = '{"scalar", "16_16", "8x4", "8_8_16", "16_8_8", "illegal_fallback",
                         "unsigned", "signed", "mixed", "per_subword_modes", "acc_feedback",
                         "boundary_carry_killed", "top_carry_out", "hold", "reset"};

  function automatic logic [15:0] pack_modes();
    return {8'b0, mode_v[3], mode_v[2], mode_v[1], mode_v[0]};
  endfunction

  // Record which mechanisms the operation now on the inputs exercises.
  task automatic count_op();
    bit ill;
    logic [127:0] r;
    logic [2:0] ke;
    r = ref_mac(32, {32'b0, mcand}, {32'b0, mlier}, {64'b0, acc_fb ? exp_out : accu},
                pack_modes(), {4'b0, kill}, ill);
    ke = ill ? 3'b000 : kill;
    case (ke)
      3'b000: seen[M_SCALAR]++;
      3'b010: seen[M_16_16]++;
      3'b111: seen[M_8X4]++;
      3'b011: seen[M_8_8_16]++;
      3'b110: seen[M_16_8_8]++;
      default: ;
    endcase
    if (ill) seen[M_ILLEGAL]++;
    begin
      bit any_uns, any_sgn, any_mix;
      mac_mode_t first;
      bit differ;
      any_uns = 0; any_sgn = 0; any_mix = 0; differ = 0;
      first = mode_v[3];
      for (int l = 0; l < 4; l++)
        if (l == 3 || ke[l]) begin                  // top lane of a sub-word
          if (mode_v[l] == MODE_UNSIGNED) any_uns = 1;
          else if (mode_v[l] == MODE_SIGNED) any_sgn = 1;
          else any_mix = 1;
          if (mode_v[l][1] != first[1] || (!mode_v[l][1] && mode_v[l] != first)) differ = 1;
        end
      if (any_uns) seen[M_UNS]++;
      if (any_sgn) seen[M_SGN]++;
      if (any_mix) seen[M_MIX]++;
      if (differ)  seen[M_PERSW]++;
    end
    if (acc_fb) seen[M_ACCFB]++;
  endtask

  task automatic step(input bit valid);
    in_valid = valid;
    if (valid && rst_n) count_op();
    @(posedge clk);
    #1;
    // model update
    if (!rst_n) begin
      exp_out = '0; exp_ill = 0; exp_valid = 0;
    end else begin
      exp_valid = valid;
    end
    checks++;
    if (out_valid !== exp_valid || m_out !== exp_out || cfg_illegal !== exp_ill) begin
      failures++;
      if (failures < 10)
        $display("FAIL t=%0t valid %b/%b m_out %h exp %h ill %b/%b", $time, out_valid, exp_valid,
                 m_out, exp_out, cfg_illegal, exp_ill);
    end
    if (valid && rst_n) begin
      for (int k = 0; k < 3; k++) if (cout_v[k] && kill[k] && !cfg_illegal) seen[M_KILLC]++;
      if (cout) seen[M_COUT]++;
    end
  endtask

  // Compute the expected result of the operation on the inputs (before the edge).
  task automatic predict();
    bit ill;
    logic [127:0] r;
    r = ref_mac(32, {32'b0, mcand}, {32'b0, mlier}, {64'b0, acc_fb ? exp_out : accu},
                pack_modes(), {4'b0, kill}, ill);
    if (rst_n) begin
      exp_out = r[63:0];
      exp_ill = ill;
    end
  endtask

  task automatic op();
    predict();
    step(1);
  endtask

  task automatic randomize_op(input int it);
    logic [2:0] legal [5] = '{3'b000, 3'b010, 3'b111, 3'b011, 3'b110};
    mcand = $urandom;
    mlier = $urandom;
    accu  = {$urandom, $urandom};
    if (it % 7 == 0) begin mcand = 32'hffff_ffff; mlier = 32'hffff_ffff; accu = '1; end
    if (it % 7 == 1) begin mcand = 32'h8080_8080; mlier = 32'h8080_8080; end
    kill = (it % 6 == 5) ? 3'($urandom) : legal[it % 6];
    if (it % 3 == 0) begin
      mac_mode_t m;
      m = 2'($urandom);
      for (int l = 0; l < 4; l++) mode_v[l] = m;
    end else
      for (int l = 0; l < 4; l++) mode_v[l] = 2'($urandom);
    acc_fb = (it % 4 == 3);
  endtask

  initial begin
    for (int l = 0; l < 4; l++) mode_v[l] = MODE_UNSIGNED;
    exp_out = '0; exp_ill = 0; exp_valid = 0;
    // reset
    rst_n = 0;
    mcand = 32'h1234_5678; mlier = 32'h9abc_def0; accu = '1;
    step(1);
    step(0);
    if (m_out === '0 && out_valid === 1'b0) seen[M_RESET]++;
    rst_n = 1;

    for (int it = 0; it < 3000; it++) begin
      randomize_op(it);
      op();
      // hold: in_valid low, inputs change, result must stay
      if (it % 50 == 10) begin
        logic [63:0] prev_out;
        prev_out = m_out;
        mcand = $urandom; mlier = $urandom; accu = {$urandom, $urandom};
        step(0);
        step(0);
        if (m_out === prev_out) seen[M_HOLD]++;
      end
    end

    // Accumulation chains: 8 MACs per chain, four 8-bit dot products.
    for (int ch = 0; ch < 40; ch++) begin
      kill = (ch % 2 == 1) ? 3'b111 : 3'b000;
      for (int l = 0; l < 4; l++) mode_v[l] = 2'(ch % 4);
      acc_fb = 0; accu = '0;
      mcand = $urandom; mlier = $urandom;
      op();
      acc_fb = 1;
      for (int k = 0; k < 7; k++) begin
        mcand = $urandom; mlier = $urandom;
        op();
      end
    end

    // reset in the middle of operation clears the result
    rst_n = 0;
    step(1);
    rst_n = 1;
    step(0);
    if (m_out === '0) seen[M_RESET]++;

    for (int m = 0; m < NM; m++) begin
      $display("mechanism %-22s seen %0d", names[m], seen[m]);
      checks++;
      if (seen[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never exercised", names[m]);
      end
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
