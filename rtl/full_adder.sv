// full_adder: the "unit add" cell, a one-bit full adder (3:2 counter).
//
// sum = a xor b xor cin, cout = majority(a, b, cin). It is the only adding
// cell of the multiplier: rows of it form the Wallace tree's carry-save
// layers, and a chain of it forms the ripple carry adder. Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  assign sum  = a ^ b ^ cin;
  assign cout = (a & b) | (a & cin) | (b & cin);

endmodule
