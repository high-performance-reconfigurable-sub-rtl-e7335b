// tb_full_adder: exhaustive check of the full adder cell against the
// arithmetic sum a + b + cin.
module tb_full_adder;
  int checks = 0, failures = 0;
  logic a, b, cin, sum, cout;

  full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, sum} !== 2'(a) + 2'(b) + 2'(cin)) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b got %b%b", a, b, cin, cout, sum);
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
