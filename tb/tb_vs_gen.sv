// tb_vs_gen: self-checking test of the vertical subexpression adders.
// Random samples are fed with a random enable; a reference keeps the last two
// accepted samples and x4 = x1 + x1[-1], x5 = x1 - x1[-1], x6 = x1 + x1[-2],
// x7 = x1 - x1[-2] are checked in every cycle, including full-scale samples
// and the cleared state after reset.
module tb_vs_gen;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  logic signed [7:0] x1;
  logic signed [8:0] x4, x5, x6, x7;

  int checks = 0;
  int failures = 0;
  int prev1, prev2;

  vs_gen #(.W_X(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    rst_n = 1'b0;
    en = 1'b0;
    x1 = 8'sd5;
    prev1 = 0;
    prev2 = 0;
    @(posedge clk);
    #1;
    check("x4 after reset", int'(x4), 5);
    check("x5 after reset", int'(x5), 5);
    check("x6 after reset", int'(x6), 5);
    check("x7 after reset", int'(x7), 5);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      v = (i % 50 == 0) ? -128 : (i % 50 == 1) ? 127 : (i % 50 == 2) ? -128
        : (i % 50 == 3) ? -128 : int'($urandom_range(255)) - 128;
      x1 = 8'(v);
      en = ($urandom_range(3) != 0) || (i % 50 < 4);
      #1;
      check("x4", int'(x4), v + prev1);
      check("x5", int'(x5), v - prev1);
      check("x6", int'(x6), v + prev2);
      check("x7", int'(x7), v - prev2);
      @(posedge clk);
      if (en) begin
        prev2 = prev1;
        prev1 = v;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
