// booth_mult_r4: radix-4 modified Booth multiplier with a Wallace tree and a
// ripple carry final adder.
//
// c = a * b for two N-bit operands (two's complement by default). The
// multiplier b, with a 0 appended below its LSB, is cut into overlapping
// 3-bit groups; one booth_encoder per group recodes it into a digit of
// {-2,-1,0,+1,+2}, so an N-bit operand needs only N/2 partial products
// instead of N. One booth_decoder row per digit forms that multiple of the
// multiplicand a (inverted for negative digits). The rows, sign-extended to
// 2N bits and shifted by two places per digit, plus one extra row holding
// the +1 of each negated digit, are reduced to two rows by a wallace_tree of
// unit adders, and a final adder produces the 2N-bit product.
//
// Stages, as in the stage diagram: [input register] -> Booth encoder + Booth
// decoder -> [register] -> Wallace tree -> [register] -> final adder ->
// [register]. With PIPELINED = 1 the four pipe_reg ranks are present: operands
// applied before rising edge k of clk are taken by the input register at edge
// k, and their product is on c, with out_valid high, after edge k+3 (four
// register stages, latency 4 cycles counting the input register). A new
// operand pair can enter on every cycle. With PIPELINED = 0 (default) the datapath is purely
// combinational, c follows a and b, out_valid equals in_valid, and clk and
// rst_n are not used (they stay as ports so both builds share one interface).
//
// Follows the described design: 8-bit operands and 16-bit product, the
// encoder/decoder equations, Wallace tree reduction, ripple carry final adder,
// O/P registers at the stage boundaries. This design's own choices: a is the
// multiplicand and b the multiplier, operands are two's complement unless
// SIGNED_OPS = 0 (then both are zero-extended by two bits, which adds one
// Booth digit), the negation +1 bits go in a separate tree row, the
// in_valid/out_valid pair, the reset, and the default of no pipelining (the
// reported simulation drives only a, b and c). FINAL_ADDER = FA_CARRY_SELECT
// swaps in the carry select adder of the stage diagram.
module booth_mult_r4
  import booth_pkg::*;
#(
  parameter int unsigned  N           = 8,          // operand width, even
  parameter bit           SIGNED_OPS  = 1'b1,       // 1: two's complement, 0: unsigned
  parameter bit           PIPELINED   = 1'b0,       // 1: O/P registers between stages
  parameter final_adder_e FINAL_ADDER = FA_RIPPLE,
  parameter int unsigned  CSEL_BLOCK  = 4           // block size of the carry select adder
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   a,          // multiplicand X
  input  logic [N-1:0]   b,          // multiplier Y
  output logic           out_valid,
  output logic [2*N-1:0] c           // product
);

  localparam int unsigned PW   = 2 * N;                      // product width
  localparam int unsigned NE   = SIGNED_OPS ? N : N + 2;     // extended operand width
  localparam int unsigned D    = NE / 2;                     // Booth digits
  localparam int unsigned ROWS = D + 1;                      // tree rows

  if (N < 2 || N % 2 != 0) begin : g_bad_n
    $error("booth_mult_r4: N must be even and at least 2");
  end

  // ---------------------------------------------------------------- stage 0
  logic [N-1:0] a_s0, b_s0;
  logic         v_s0;

  if (PIPELINED) begin : g_reg_in
    pipe_reg #(.W(2*N+1)) u_reg (
      .clk, .rst_n,
      .d({in_valid, a, b}),
      .q({v_s0, a_s0, b_s0})
    );
  end else begin : g_wire_in
    assign {v_s0, a_s0, b_s0} = {in_valid, a, b};
  end

  // ------------------------------------- stage 1: Booth encoder + decoder
  logic [NE-1:0] x_ext;
  logic [NE:0]   y_ext;              // multiplier with the appended 0 below its LSB

  if (SIGNED_OPS) begin : g_ext_signed
    assign x_ext = a_s0;
    assign y_ext = {b_s0, 1'b0};
  end else begin : g_ext_unsigned
    assign x_ext = {2'b00, a_s0};
    assign y_ext = {2'b00, b_s0, 1'b0};
  end

  booth_sel_t      sel  [D];
  logic [NE:0]     pp   [D];
  logic [PW-1:0]   rows [ROWS];

  for (genvar i = 0; i < D; i++) begin : g_digit
    booth_encoder u_enc (
      .y  (y_ext[2*i +: 3]),
      .sel(sel[i])
    );

    booth_decoder #(.W(NE)) u_dec (
      .x  (x_ext),
      .sel(sel[i]),
      .pp (pp[i])
    );

    // Sign-extend the row to the product width, then move it to weight 4^i.
    logic [PW+NE:0] pp_ext;
    assign pp_ext  = {{PW{pp[i][NE]}}, pp[i]};
    assign rows[i] = PW'(pp_ext << (2 * i));
  end

  // Extra row: the +1 that turns each inverted row into its negation.
  always_comb begin
    rows[D] = '0;
    for (int i = 0; i < D; i++) begin
      if (2 * i < PW) rows[D][2*i] = sel[i].neg;
    end
  end

  logic [PW-1:0] rows_s1 [ROWS];
  logic          v_s1;

  if (PIPELINED) begin : g_reg_pp
    logic [ROWS*PW-1:0] flat_d, flat_q;
    for (genvar r = 0; r < ROWS; r++) begin : g_pack
      assign flat_d[r*PW +: PW] = rows[r];
      assign rows_s1[r]         = flat_q[r*PW +: PW];
    end
    pipe_reg #(.W(ROWS*PW+1)) u_reg (
      .clk, .rst_n,
      .d({v_s0, flat_d}),
      .q({v_s1, flat_q})
    );
  end else begin : g_wire_pp
    assign rows_s1 = rows;
    assign v_s1    = v_s0;
  end

  // --------------------------------------------------- stage 2: Wallace tree
  logic [PW-1:0] tsum, tcarry;

  wallace_tree #(.ROWS(ROWS), .W(PW)) u_tree (
    .rows (rows_s1),
    .sum  (tsum),
    .carry(tcarry)
  );

  logic [PW-1:0] tsum_s2, tcarry_s2;
  logic          v_s2;

  if (PIPELINED) begin : g_reg_tree
    pipe_reg #(.W(2*PW+1)) u_reg (
      .clk, .rst_n,
      .d({v_s1, tsum, tcarry}),
      .q({v_s2, tsum_s2, tcarry_s2})
    );
  end else begin : g_wire_tree
    assign {v_s2, tsum_s2, tcarry_s2} = {v_s1, tsum, tcarry};
  end

  // -------------------------------------------------- stage 3: final adder
  logic [PW-1:0] prod;

  if (FINAL_ADDER == FA_CARRY_SELECT) begin : g_csel
    carry_select_adder #(.W(PW), .BLOCK(CSEL_BLOCK)) u_add (
      .a   (tsum_s2),
      .b   (tcarry_s2),
      .cin (1'b0),
      .s   (prod),
      .cout()
    );
  end else begin : g_rca
    ripple_carry_adder #(.W(PW)) u_add (
      .a   (tsum_s2),
      .b   (tcarry_s2),
      .cin (1'b0),
      .s   (prod),
      .cout()
    );
  end

  if (PIPELINED) begin : g_reg_out
    pipe_reg #(.W(PW+1)) u_reg (
      .clk, .rst_n,
      .d({v_s2, prod}),
      .q({out_valid, c})
    );
  end else begin : g_wire_out
    assign {out_valid, c} = {v_s2, prod};
  end

endmodule
