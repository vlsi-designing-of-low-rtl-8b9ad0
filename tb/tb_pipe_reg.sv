// tb_pipe_reg: checks reset and the one-cycle delay of the pipeline register.
module tb_pipe_reg;
  localparam int W = 16;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [W-1:0] d, q, prev;
  int checks = 0, failures = 0;

  pipe_reg #(.W(W)) dut (.clk, .rst_n, .d, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    d     = 16'hA5A5;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q != '0) begin
      failures++;
      $display("FAIL q=%h during reset", q);
    end
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      d = W'($urandom);
      prev = d;
      @(posedge clk);
      #1;
      checks++;
      if (q != prev) begin
        failures++;
        if (failures < 10) $display("FAIL q=%h want %h", q, prev);
      end
    end
    rst_n = 1'b0;
    #1;
    checks++;
    if (q != '0) begin
      failures++;
      $display("FAIL asynchronous reset did not clear q=%h", q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
