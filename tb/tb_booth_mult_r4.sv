// tb_booth_mult_r4: end-to-end test of the multiplier in all its builds.
//
// Four instances run side by side:
//   dut_comb  default build (8-bit two's complement, combinational, ripple
//             carry final adder): all 65536 operand pairs, checked against a
//             signed multiply.
//   dut_pipe  PIPELINED = 1: a new random pair enters on every cycle; each
//             product must come out exactly 4 cycles later with out_valid
//             set, and out_valid must be low while the pipeline is empty.
//   dut_uns   SIGNED_OPS = 0: all pairs, checked against an unsigned multiply.
//   dut_csel  FINAL_ADDER = FA_CARRY_SELECT: all pairs, signed.
// It also counts how often each mechanism of the datapath was exercised:
// every Booth digit value (-2..+2, recoded here from b independently of the
// RTL), a negated partial product, a filled pipeline, a bubble in the valid
// stream, the unsigned build and the carry select adder. A mechanism that
// never happened counts as a failure.
module tb_booth_mult_r4;
  import booth_pkg::*;

  localparam int N   = 8;
  localparam int LAT = 4;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic [N-1:0] a, b;
  logic [N-1:0] pa, pb;
  logic pv;
  logic v_comb, v_pipe, v_uns, v_csel;
  logic [2*N-1:0] c_comb, c_pipe, c_uns, c_csel;
  int checks = 0, failures = 0;

  int n_digit [5];      // index = digit + 2
  int n_neg_rows = 0, n_pipe_full = 0, n_bubble = 0, n_uns = 0, n_csel = 0;

  booth_mult_r4 dut_comb (
    .clk, .rst_n, .in_valid, .a, .b, .out_valid(v_comb), .c(c_comb)
  );
  booth_mult_r4 #(.PIPELINED(1'b1)) dut_pipe (
    .clk, .rst_n, .in_valid(pv), .a(pa), .b(pb), .out_valid(v_pipe), .c(c_pipe)
  );
  booth_mult_r4 #(.SIGNED_OPS(1'b0)) dut_uns (
    .clk, .rst_n, .in_valid, .a, .b, .out_valid(v_uns), .c(c_uns)
  );
  booth_mult_r4 #(.FINAL_ADDER(FA_CARRY_SELECT)) dut_csel (
    .clk, .rst_n, .in_valid, .a, .b, .out_valid(v_csel), .c(c_csel)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void count_digits(logic [N-1:0] y);
    logic [N:0] ye = {y, 1'b0};
    for (int i = 0; i < N / 2; i++) begin
      int d = -2 * int'(ye[2*i+2]) + int'(ye[2*i+1]) + int'(ye[2*i]);
      n_digit[d+2]++;
      if (d < 0) n_neg_rows++;
    end
  endfunction

  task automatic check(string what, logic [2*N-1:0] got, logic [2*N-1:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%0d b=%0d got=%0d want=%0d", what, a, b, got, want);
    end
  endtask

  // Combinational builds: exhaustive sweep.
  task automatic sweep();
    in_valid = 1'b1;
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        a = N'(i);
        b = N'(j);
        #1;
        count_digits(b);
        check("signed", c_comb, (2*N)'($signed(a) * $signed(b)));
        check("unsigned", c_uns, (2*N)'({8'b0, a} * {8'b0, b}));
        n_uns++;
        check("carry-select", c_csel, (2*N)'($signed(a) * $signed(b)));
        n_csel++;
        checks++;
        if (!(v_comb && v_uns && v_csel)) failures++;
      end
    end
    in_valid = 1'b0;
    #1;
    checks++;
    if (v_comb) begin
      failures++;
      $display("FAIL out_valid of the combinational build does not follow in_valid");
    end
  endtask

  // Pipelined build: stream of random pairs with a few bubbles.
  logic [2*N-1:0] exp_q [$];
  logic           vld_q [$];

  task automatic stream(int cycles);
    for (int t = 0; t < cycles + LAT; t++) begin
      @(negedge clk);
      pv = (t < cycles) && ((t % 37) != 5);
      pa = N'($urandom);
      pb = N'($urandom);
      if (t < 12) begin
        pa = N'(-128 + 127 * (t % 2));
        pb = N'(-128 + 255 * (t / 2 % 2));
      end
      exp_q.push_back((2*N)'($signed(pa) * $signed(pb)));
      vld_q.push_back(pv);
      if (!pv && t < cycles) n_bubble++;
      @(posedge clk);
      #1;
      if (vld_q.size() >= LAT) begin
        logic [2*N-1:0] e = exp_q.pop_front();
        logic           ev = vld_q.pop_front();
        checks++;
        if (v_pipe !== ev) begin
          failures++;
          if (failures < 20) $display("FAIL pipelined out_valid=%b want %b at t=%0d", v_pipe, ev, t);
        end
        if (ev) begin
          checks++;
          if (c_pipe !== e) begin
            failures++;
            if (failures < 20) $display("FAIL pipelined c=%0d want %0d at t=%0d", c_pipe, e, t);
          end
          n_pipe_full++;
        end
      end else begin
        checks++;
        if (v_pipe) begin
          failures++;
          $display("FAIL out_valid high before the pipeline filled (t=%0d)", t);
        end
      end
    end
  endtask

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    pv       = 1'b0;
    a = '0; b = '0; pa = '0; pb = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (v_pipe || c_pipe != '0) begin
      failures++;
      $display("FAIL pipelined build not cleared by reset");
    end
    rst_n = 1'b1;

    fork
      stream(4000);
      sweep();
    join

    for (int d = 0; d < 5; d++) begin
      $display("digit %0d seen %0d times", d - 2, n_digit[d]);
      checks++;
      if (n_digit[d] == 0) failures++;
    end
    $display("negated rows %0d, pipelined results %0d, bubbles %0d, unsigned %0d, carry-select %0d",
             n_neg_rows, n_pipe_full, n_bubble, n_uns, n_csel);
    checks++; if (n_neg_rows == 0)  failures++;
    checks++; if (n_pipe_full == 0) failures++;
    checks++; if (n_bubble == 0)    failures++;
    checks++; if (n_uns == 0)       failures++;
    checks++; if (n_csel == 0)      failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
