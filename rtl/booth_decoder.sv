// booth_decoder: partial product generator (PPG) for one Booth digit.
//
// Every bit j of the row is
//   pp(j) = ((X(j-1) and two) or (X(j) and zero)) xor neg
// as in the decoder logic diagram: "two" picks the multiplicand shifted left by
// one place, "zero" (digit +-1) picks it unshifted, and "neg" inverts the
// selected multiple. The row is one bit wider than the multiplicand so that
// 2*X fits; X(-1) is 0 and X(W) repeats the multiplicand's top bit (sign
// extension of a two's complement operand). The +1 that completes the
// negation is not added here: the caller adds sel.neg at the row's least
// significant position. Purely combinational.
module booth_decoder
  import booth_pkg::*;
#(
  parameter int unsigned W = 8     // multiplicand width as seen by the row
) (
  input  logic [W-1:0] x,          // multiplicand, two's complement
  input  booth_sel_t   sel,
  output logic [W:0]   pp          // partial product row, two's complement
);

  logic [W+1:0] xe;                // {X(W), X(W-1) .. X(0), X(-1)}
  assign xe = {x[W-1], x, 1'b0};

  always_comb begin
    for (int j = 0; j <= W; j++) begin
      pp[j] = ((xe[j] & sel.two) | (xe[j+1] & sel.zero)) ^ sel.neg;
    end
  end

endmodule
