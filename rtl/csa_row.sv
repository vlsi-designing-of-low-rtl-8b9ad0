// csa_row: one carry-save layer of unit adders (3:2 compressor row).
//
// Takes three W-bit rows and returns two, sum and carry, with
// a + b + c == s + cy (mod 2^W). Each bit position holds one full adder; the
// carries are moved one place left, and the carry out of the top bit is
// dropped because the whole multiplier works modulo 2^W. Combinational.
module csa_row #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);

  logic [W-1:0] co;

  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (s[i]),
      .cout(co[i])
    );
  end

  assign cy = {co[W-2:0], 1'b0};

endmodule
