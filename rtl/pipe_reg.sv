// pipe_reg: W-bit pipeline register ("O/P register" between multiplier stages).
//
// q takes d on every rising edge of clk; an active-low asynchronous reset
// clears it to zero. The reset style and value are this design's own choice.
module pipe_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
