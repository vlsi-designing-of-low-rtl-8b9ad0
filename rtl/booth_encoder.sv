// booth_encoder: radix-4 modified Booth encoder for one multiplier digit.
//
// It looks at one overlapping triplet of multiplier bits {Y(n+1), Y(n), Y(n-1)}
// and recodes it into a digit of {-2, -1, 0, +1, +2}, given as three select
// lines (see booth_pkg::booth_sel_t):
//   zero = Y(n) xor Y(n-1)                       digit is +-1
//   two  = (Y(n+1) xor Y(n)) and not zero        digit is +-2
//   neg  = Y(n+1) and not (Y(n) and Y(n-1))      digit is negative
// The zero and two equations and the signal names are those of the encoder
// truth table and logic diagram. For neg the logic diagram wires Y(n+1)
// straight through while the truth table gives neg = 0 for the triplet 111
// (digit 0); this design follows the truth table, so a zero digit never
// produces an inverted all-ones row. Both choices give the same product.
// Purely combinational; one instance per multiplier digit.
module booth_encoder
  import booth_pkg::*;
(
  input  logic [2:0]  y,    // {Y(n+1), Y(n), Y(n-1)}
  output booth_sel_t  sel
);

  always_comb begin
    sel.zero = y[1] ^ y[0];
    sel.two  = (y[2] ^ y[1]) & ~sel.zero;
    sel.neg  = y[2] & ~(y[1] & y[0]);
  end

endmodule
