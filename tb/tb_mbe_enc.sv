// tb_mbe_enc: exhaustive check of the race-free Booth encoder against the
// race-free truth table (columns P1 P2 Neg Z), and that the decoded digit
// (p1 -> 1, p2 & ~z -> 2, negated by neg) equals the radix-4 Booth digit
// -2*y[2i+1] + y[2i] + y[2i-1].
module tb_mbe_enc;
  import swp_mac_pkg::*;
  int checks = 0, failures = 0;
  logic [2:0] trip;
  mbe_sig_t   enc;

  mbe_enc dut (.trip(trip), .enc(enc));

  // Race-free truth table, rows 000 .. 111, bits {P1, P2, Neg, Z}.
  localparam logic [3:0] TABLE [8] = '{4'b0101, 4'b1001, 4'b1000, 4'b0100,
                                       4'b0110, 4'b1010, 4'b1011, 4'b0111};

  initial begin
    for (int v = 0; v < 8; v++) begin
      int digit, mag;
      trip = 3'(v);
      #1;
      checks++;
      if ({enc.p1, enc.p2, enc.neg, enc.z} !== TABLE[v]) begin
        failures++;
        $display("FAIL trip=%b got %b exp %b", trip, {enc.p1, enc.p2, enc.neg, enc.z}, TABLE[v]);
      end
      digit = -2 * int'(trip[2]) + int'(trip[1]) + int'(trip[0]);
      mag   = enc.p1 ? 1 : ((enc.p2 & ~enc.z) ? 2 : 0);
      checks++;
      if ((enc.neg ? -mag : mag) !== digit) begin
        failures++;
        $display("FAIL digit trip=%b got %0d exp %0d", trip, enc.neg ? -mag : mag, digit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
