// ripple_carry_adder: W-bit carry-propagate adder built as a chain of unit adders.
//
// s = a + b + cin, cout is the carry out of the top bit. Bit i's full adder
// takes the carry of bit i-1, so the carry ripples through all W cells. It is
// the final adder of the multiplier, turning the Wallace tree's sum and carry
// rows into the product; the multiplier chooses it because it is the smallest
// and least switching adder. Combinational.
module ripple_carry_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (s[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];

endmodule
