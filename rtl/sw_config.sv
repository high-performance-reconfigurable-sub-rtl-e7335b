// sw_config: pre-decoder of the sub-word configuration of the SWP MAC.
//
// The N-bit MAC is cut into NL = N/8 basic lanes of 8 input bits. kill[k]
// sits between lane k and lane k+1 (kill[k] = 1 separates them), as in the
// document's interface. A run of lanes not separated by a kill forms one
// sub-word. The partial product array only exists for sub-words that are a
// power-of-two number of lanes starting at a multiple of their own size
// (16-bit: (16) (8,8); 32-bit: (32) (16,16) (8,8,8,8) (8,8,16) (16,8,8);
// 64-bit: (64) plus any pair of 32-bit combinations). Any other kill pattern
// is illegal and, as the document asks, falls back to scalar mode; the
// illegal flag is this design's own addition so a caller can see it.
//
// Each sub-word takes the mode of its most significant lane (the lane the
// document marks as configurable); the modes given for its other lanes are
// ignored. For every lane the block reports the log2 of its sub-word size in
// lanes and the sub-word's mode, which the rest of the MAC uses to steer its
// multiplexers. Purely combinational.
module sw_config
  import swp_mac_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N/8-2:0]  kill,                   // requested boundaries
  input  mac_mode_t       mode_v   [N/8],         // requested mode per lane
  output logic [N/8-2:0]  kill_eff,               // boundaries in force
  output logic            cfg_illegal,            // kill pattern not supported
  output logic [2:0]      lane_lg  [N/8],         // log2(sub-word lanes)
  output mac_mode_t       lane_mode[N/8]          // mode of the lane's sub-word
);

  localparam int NL    = N / 8;
  localparam int LG_NL = clog2i(NL);

  // log2 of a legal sub-word size in lanes (1, 2, 4 or 8).
  function automatic logic [2:0] lg_small(logic [4:0] sz);
    case (sz)
      2:       return 3'd1;
      4:       return 3'd2;
      8:       return 3'd3;
      default: return 3'd0;
    endcase
  endfunction

  // Sub-word extent of every lane for the requested kill pattern.
  logic [3:0] sw_start [NL];
  logic [3:0] sw_end   [NL];
  logic legal;

  always_comb begin
    legal = 1'b1;
    for (int l = 0; l < NL; l++) begin
      logic [3:0] s, e;
      logic [4:0] sz;
      s = '0;
      for (int q = 1; q <= l; q++) if (kill[q-1]) s = 4'(q);
      e = 4'(NL - 1);
      for (int q = NL - 2; q >= l; q--) if (kill[q]) e = 4'(q);
      sw_start[l] = s;
      sw_end[l]   = e;
      sz = 5'(e) - 5'(s) + 5'd1;
      if ((sz & (sz - 1)) != 0) legal = 1'b0;
      else if ((5'(s) & (sz - 5'd1)) != 0) legal = 1'b0;
    end
  end

  always_comb begin
    cfg_illegal = ~legal;
    kill_eff    = legal ? kill : '0;
    for (int l = 0; l < NL; l++) begin
      if (legal) begin
        lane_lg[l]   = lg_small(5'(sw_end[l]) - 5'(sw_start[l]) + 5'd1);
        lane_mode[l] = mode_v[sw_end[l][LG_NL-1:0]];
      end else begin
        lane_lg[l]   = 3'(LG_NL);
        lane_mode[l] = mode_v[NL-1];
      end
    end
  end

endmodule
