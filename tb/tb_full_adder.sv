// tb_full_adder: exhaustive check of the unit adder: {cout, sum} == a + b + cin.
module tb_full_adder;
  logic clk = 1'b0;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  full_adder dut (.a, .b, .cin, .sum, .cout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      {a, b, cin} = 3'(t);
      @(posedge clk);
      checks++;
      if (int'({cout, sum}) != int'(a) + int'(b) + int'(cin)) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b -> cout=%b sum=%b", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
