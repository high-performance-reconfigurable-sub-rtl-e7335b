// swp_mac_unit: the SWP MAC with its result register and accumulator loop.
//
// Wraps the combinational swp_mac core. The result (m_out and the carries)
// is registered; when acc_fb is set the core's accumulator input is the
// registered result of the previous operation instead of the accu port, which
// closes the m_out -> accu loop of the document's execution flow so a series
// of multiply-accumulates runs at one per clock. The kill and mode inputs may
// change on any cycle: the sub-word layout is reconfigured per operation.
//
// Timing: an operation presented with in_valid on a rising edge of clk has its
// result on m_out/cout_v/cout with out_valid one cycle later (latency 1,
// throughput 1 per cycle). With in_valid low the register holds its value.
// rst_n is an active-low synchronous reset that clears the register. The
// register and the feedback select are this design's choices; the document
// leaves pipelining to the user (it suggests the tree's inputs and outputs).
module swp_mac_unit
  import swp_mac_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic            acc_fb,          // 1: accumulate onto m_out
  input  logic [N-1:0]    mcand,
  input  logic [N-1:0]    mlier,
  input  logic [2*N-1:0]  accu,
  input  mac_mode_t       mode_v [N/8],
  input  logic [N/8-2:0]  kill,
  output logic            out_valid,
  output logic [2*N-1:0]  m_out,
  output logic [N/8-2:0]  cout_v,
  output logic            cout,
  output logic            cfg_illegal
);

  logic [2*N-1:0] accu_sel, res;
  logic [N/8-2:0] res_cv;
  logic           res_c, res_ill;

  assign accu_sel = acc_fb ? m_out : accu;

  swp_mac #(.N(N)) u_core (
    .mcand      (mcand),
    .mlier      (mlier),
    .accu       (accu_sel),
    .mode_v     (mode_v),
    .kill       (kill),
    .m_out      (res),
    .cout_v     (res_cv),
    .cout       (res_c),
    .cfg_illegal(res_ill)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      m_out       <= '0;
      cout_v      <= '0;
      cout        <= 1'b0;
      cfg_illegal <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        m_out       <= res;
        cout_v      <= res_cv;
        cout        <= res_c;
        cfg_illegal <= res_ill;
      end
    end
  end

endmodule
