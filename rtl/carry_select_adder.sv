// carry_select_adder: W-bit carry select adder, the alternative final adder.
//
// The operands are cut into blocks of BLOCK bits. The lowest block is a plain
// ripple carry adder fed by cin. Every other block is computed twice in
// parallel (carry generator): once assuming a carry in of 0 and once assuming
// 1. The real carry into the block then picks one of the two results (sum
// selector), and the picked carry out selects in the next block, so only a
// chain of multiplexers lies on the carry path. The block size is this
// design's own choice. Combinational. W must be a multiple of BLOCK.
module carry_select_adder #(
  parameter int unsigned W     = 16,
  parameter int unsigned BLOCK = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int unsigned NB = W / BLOCK;

  if (W % BLOCK != 0 || NB < 1) begin : g_bad_block
    $error("carry_select_adder: W must be a positive multiple of BLOCK");
  end

  logic [NB:0] c;     // carry into each block

  assign c[0] = cin;

  ripple_carry_adder #(.W(BLOCK)) u_blk0 (
    .a   (a[BLOCK-1:0]),
    .b   (b[BLOCK-1:0]),
    .cin (c[0]),
    .s   (s[BLOCK-1:0]),
    .cout(c[1])
  );

  for (genvar k = 1; k < NB; k++) begin : g_blk
    logic [BLOCK-1:0] s0, s1;
    logic             c0, c1;

    ripple_carry_adder #(.W(BLOCK)) u_c0 (
      .a   (a[k*BLOCK +: BLOCK]),
      .b   (b[k*BLOCK +: BLOCK]),
      .cin (1'b0),
      .s   (s0),
      .cout(c0)
    );

    ripple_carry_adder #(.W(BLOCK)) u_c1 (
      .a   (a[k*BLOCK +: BLOCK]),
      .b   (b[k*BLOCK +: BLOCK]),
      .cin (1'b1),
      .s   (s1),
      .cout(c1)
    );

    assign s[k*BLOCK +: BLOCK] = c[k] ? s1 : s0;
    assign c[k+1]              = c[k] ? c1 : c0;
  end

  assign cout = c[NB];

endmodule
