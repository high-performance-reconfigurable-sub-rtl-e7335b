// tb_fong_adder: checks the reconfigurable Ling/carry-select adder in its two
// shapes: 64 bits broken every 16 bits (the MAC's final adder) and 32 bits
// broken every 8 bits. For random operands, carry-in and break vectors, every
// segment must hold a + b + carry-in of that segment, where the carry-in is
// the lower segment's carry-out unless brk cuts it, cout_seg must be each
// segment's own carry-out and cout the carry out of the top bit.
module tb_fong_adder;
  int checks = 0, failures = 0;

  logic [63:0] a, b;
  logic        cin;
  logic [6:0]  brk;

  logic [63:0] s64; logic [2:0] cs64; logic co64;
  fong_adder dut64 (.a(a), .b(b), .cin(cin), .brk(brk[2:0]), .s(s64), .cout_seg(cs64), .cout(co64));

  logic [31:0] s32; logic [2:0] cs32; logic co32;
  fong_adder #(.W(32), .SEG(8)) dut32 (.a(a[31:0]), .b(b[31:0]), .cin(cin), .brk(brk[2:0]),
    .s(s32), .cout_seg(cs32), .cout(co32));

  task automatic check(input int w, input int seg, input logic [63:0] s, input logic [2:0] cs, input logic co);
    logic c;
    c = cin;
    for (int g = 0; g < w / seg; g++) begin
      logic [64:0] t;
      t = '0;
      for (int k = 0; k < seg; k++) t += (65'(a[g*seg + k]) + 65'(b[g*seg + k])) << k;
      t += 65'(c);
      checks++;
      for (int k = 0; k < seg; k++)
        if (s[g*seg + k] !== t[k]) begin
          failures++;
          if (failures < 8) $display("FAIL W=%0d seg %0d a=%h b=%h brk=%b", w, g, a, b, brk);
          break;
        end
      if (g < w / seg - 1) begin
        checks++;
        if (cs[g] !== t[seg]) begin
          failures++;
          if (failures < 8) $display("FAIL W=%0d cout_seg %0d", w, g);
        end
        c = brk[g] ? 1'b0 : t[seg];
      end else begin
        checks++;
        if (co !== t[seg]) begin
          failures++;
          if (failures < 8) $display("FAIL W=%0d cout", w);
        end
      end
    end
  endtask

  initial begin
    for (int it = 0; it < 20000; it++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      if (it % 3 == 0) b = ~a;                 // long propagate chains
      cin = 1'($urandom);
      brk = 7'($urandom);
      #1;
      check(64, 16, s64, cs64, co64);
      check(32, 8, {32'b0, s32}, cs32, co32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
