// tb_booth_decoder: checks one partial product row against digit * multiplicand.
//
// For every 8-bit multiplicand and every legal select combination (digits
// -2..+2) the row read as a 9-bit two's complement number, plus the neg bit
// that the adder tree adds, must equal digit * x. The reference is plain
// integer multiplication.
module tb_booth_decoder;
  import booth_pkg::*;

  localparam int W = 8;

  logic         clk = 1'b0;
  logic [W-1:0] x;
  booth_sel_t   sel;
  logic [W:0]   pp;
  int checks = 0, failures = 0;

  booth_decoder #(.W(W)) dut (.x, .sel, .pp);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, want, got;
    for (int v = 0; v < (1 << W); v++) begin
      for (d = -2; d <= 2; d++) begin
        x        = W'(v);
        sel.neg  = (d < 0);
        sel.two  = (d == 2 || d == -2);
        sel.zero = (d == 1 || d == -1);
        #1;
        want = d * int'($signed(x));
        got  = int'($signed(pp)) + int'(sel.neg);
        checks++;
        if (got != want) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d d=%0d got=%0d want=%0d", $signed(x), d, got, want);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
