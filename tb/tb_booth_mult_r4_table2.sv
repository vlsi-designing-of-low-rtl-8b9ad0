// tb_booth_mult_r4_table2: the multiplier at its default parameters.
//
// First the three operand pairs of the published results table are applied in
// turn, each held for 500 ns as in the reported simulation (92 x 49 = 4508,
// 15 x 105 = 1575, 85 x 124 = 10540); then every pair of 8-bit two's
// complement operands is checked against a signed multiply.
`timescale 1ns / 1ps
module tb_booth_mult_r4_table2;
  localparam int N = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic in_valid = 1'b1;
  logic [N-1:0] a, b;
  logic out_valid;
  logic [2*N-1:0] c;
  int checks = 0, failures = 0;

  booth_mult_r4 dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .c);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int a; int b; int c; } vec_t;
  vec_t table2 [3] = '{'{92, 49, 4508}, '{15, 105, 1575}, '{85, 124, 10540}};

  initial begin
    foreach (table2[k]) begin
      a = N'(table2[k].a);
      b = N'(table2[k].b);
      #500;
      checks++;
      if (int'(c) != table2[k].c || !out_valid) begin
        failures++;
        $display("FAIL %0d x %0d: got %0d want %0d", table2[k].a, table2[k].b, c, table2[k].c);
      end else begin
        $display("%0d x %0d = %0d", table2[k].a, table2[k].b, c);
      end
    end
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        a = N'(i);
        b = N'(j);
        #1;
        checks++;
        if (c != (2*N)'($signed(a) * $signed(b))) begin
          failures++;
          if (failures < 20) $display("FAIL %0d x %0d: got %0d", $signed(a), $signed(b), $signed(c));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
