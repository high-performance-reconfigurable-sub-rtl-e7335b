// tb_fa_cout_mask: exhaustive check of the full adder with carry-out
// masking: with kill low it must add, with kill high the sum bit is kept and
// the carry-out must be zero.
module tb_fa_cout_mask;
  int checks = 0, failures = 0;
  logic a, b, cin, kill, sum, cout;

  fa_cout_mask dut (.a(a), .b(b), .cin(cin), .kill(kill), .sum(sum), .cout(cout));

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [1:0] tot;
      {kill, a, b, cin} = 4'(v);
      #1;
      tot = 2'(a) + 2'(b) + 2'(cin);
      checks++;
      if (sum !== tot[0] || cout !== (tot[1] & ~kill)) begin
        failures++;
        $display("FAIL kill=%b a=%b b=%b cin=%b got %b%b", kill, a, b, cin, cout, sum);
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
