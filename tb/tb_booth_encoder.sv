// tb_booth_encoder: exhaustive check of the radix-4 Booth encoder.
//
// All eight multiplier triplets are applied. For each, the digit implied by
// the select lines, (neg ? -1 : +1) * (two ? 2 : zero ? 1 : 0), must equal the
// radix-4 digit -2*Y(n+1) + Y(n) + Y(n-1), neg must be 0 whenever the digit is
// 0, and zero and two must never both be set. The reference values are
// computed here from the digit formula, not from the encoder equations.
module tb_booth_encoder;
  import booth_pkg::*;

  logic       clk = 1'b0;
  logic [2:0] y;
  booth_sel_t sel;
  int checks = 0, failures = 0;

  booth_encoder dut (.y, .sel);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want, got;
    for (int t = 0; t < 8; t++) begin
      y = 3'(t);
      @(posedge clk);
      want = -2 * int'(y[2]) + int'(y[1]) + int'(y[0]);
      got  = (sel.two ? 2 : (sel.zero ? 1 : 0)) * (sel.neg ? -1 : 1);
      checks++;
      if (got != want) begin
        failures++;
        $display("FAIL y=%b digit=%0d got=%0d (neg=%b two=%b zero=%b)",
                 y, want, got, sel.neg, sel.two, sel.zero);
      end
      checks++;
      if (want == 0 && sel.neg) begin
        failures++;
        $display("FAIL y=%b: neg set for a zero digit", y);
      end
      checks++;
      if (sel.two && sel.zero) begin
        failures++;
        $display("FAIL y=%b: two and zero both set", y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
