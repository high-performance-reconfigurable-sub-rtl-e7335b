// full_adder: the (3:2) counter cell of the partial product reduction tree.
//
// sum = a ^ b ^ cin; cout = (a & b) | ((a ^ b) & cin), the gate arrangement of
// the document's FA cell. In the document this cell is a library full adder
// and a tree generator orders its inputs by path delay (a, b slow; cin fast);
// here it is plain logic, and swpprt orders the inputs with a unit-gate
// estimate of those delays.
// Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic axb;

  always_comb begin
    axb  = a ^ b;
    sum  = axb ^ cin;
    cout = (a & b) | (axb & cin);
  end

endmodule
