// tb_carry_select_adder: random and corner check of the 16-bit carry_select_adder.
//
// {cout, s} must equal a + b + cin, computed here with 17-bit arithmetic.
// Corner cases (all ones plus carry in, carries through every block) come
// first, then random operands.
module tb_carry_select_adder;
  localparam int W = 16;

  logic         clk = 1'b0;
  logic [W-1:0] a, b, s;
  logic         cin, cout;
  int checks = 0, failures = 0;

  carry_select_adder #(.W(W)) dut (.a, .b, .cin, .s, .cout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] want;
    for (int t = 0; t < 10000; t++) begin
      case (t)
        0:       begin a = '1; b = '0; cin = 1'b1; end
        1:       begin a = '1; b = '1; cin = 1'b1; end
        2:       begin a = '0; b = '0; cin = 1'b0; end
        3:       begin a = 16'h0FFF; b = 16'h0001; cin = 1'b0; end
        default: begin a = W'($urandom); b = W'($urandom); cin = 1'($urandom); end
      endcase
      @(posedge clk);
      want = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
      checks++;
      if ({cout, s} != want) begin
        failures++;
        if (failures < 10) $display("FAIL %h + %h + %b = %h, got %h", a, b, cin, want, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
