// tb_wallace_tree: random check of the carry-save tree.
//
// Two trees are tested: the multiplier's own size (5 rows of 16 bits) and a
// larger one (9 rows) that exercises more levels. For random rows the sum and
// carry outputs must add up to the sum of all rows modulo 2^16.
module tb_wallace_tree;
  localparam int W = 16;

  logic         clk = 1'b0;
  logic [W-1:0] r5 [5];
  logic [W-1:0] r9 [9];
  logic [W-1:0] s5, c5, s9, c9;
  int checks = 0, failures = 0;

  wallace_tree #(.ROWS(5), .W(W)) dut5 (.rows(r5), .sum(s5), .carry(c5));
  wallace_tree #(.ROWS(9), .W(W)) dut9 (.rows(r9), .sum(s9), .carry(c9));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] want5, want9;
    for (int t = 0; t < 5000; t++) begin
      want5 = '0;
      want9 = '0;
      for (int i = 0; i < 5; i++) begin
        r5[i] = (t < 4) ? {W{t[0]}} : W'($urandom);
        want5 += r5[i];
      end
      for (int i = 0; i < 9; i++) begin
        r9[i] = (t < 4) ? {W{t[1]}} : W'($urandom);
        want9 += r9[i];
      end
      @(posedge clk);
      checks++;
      if (W'(s5 + c5) != want5) begin
        failures++;
        if (failures < 10) $display("FAIL 5 rows: %h + %h != %h", s5, c5, want5);
      end
      checks++;
      if (W'(s9 + c9) != want9) begin
        failures++;
        if (failures < 10) $display("FAIL 9 rows: %h + %h != %h", s9, c9, want9);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
