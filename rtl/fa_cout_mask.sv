// fa_cout_mask: full adder with carry-out masking, used in the reduction tree
// at the most significant column of every basic sub-word lane.
//
// When kill is set the carry-out is forced to zero, so no carry crosses into
// the next sub-word; the sum is untouched. Masking the carry-out (rather than
// the carry-in of the next column's adder) keeps every input of the cell free
// to be wired as the tree likes. Gate form of the document's figure:
//   sum  = a ^ b ^ cin
//   cout = (a & b & ~kill) | ((a | b) & (cin & ~kill))
// Combinational.
module fa_cout_mask (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic kill,
  output logic sum,
  output logic cout
);

  logic kill_n;

  always_comb begin
    kill_n = ~kill;
    sum    = a ^ b ^ cin;
    cout   = (a & b & kill_n) | ((a | b) & (cin & kill_n));
  end

endmodule
