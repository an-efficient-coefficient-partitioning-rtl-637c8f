// tb_hs_gen: self-checking test of the horizontal subexpression adders.
// For every 8-bit input, and for random 12-bit inputs on a second instance,
// x2 must equal 5*x1 and x3 3*x1 (x1 + x1/4 and x1 - x1/4 with two fraction
// bits kept), and x1 must pass through unchanged.
module tb_hs_gen;

  logic signed [7:0]  a1, a1_o;
  logic signed [10:0] a2, a3;
  logic signed [11:0] b1, b1_o;
  logic signed [14:0] b2, b3;

  int checks = 0;
  int failures = 0;

  hs_gen #(.W_X(8))  u_a (.x1(a1), .x1_o(a1_o), .x2(a2), .x3(a3));
  hs_gen #(.W_X(12)) u_b (.x1(b1), .x1_o(b1_o), .x2(b2), .x3(b3));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    for (int i = -128; i < 128; i++) begin
      a1 = 8'(i);
      #1;
      check("x2 (8 bit)", int'(a2), 5 * i);
      check("x3 (8 bit)", int'(a3), 3 * i);
      check("x1 (8 bit)", int'(a1_o), i);
    end
    for (int i = 0; i < 500; i++) begin
      v = (i == 0) ? -2048 : (i == 1) ? 2047 : int'($urandom_range(4095)) - 2048;
      b1 = 12'(v);
      #1;
      check("x2 (12 bit)", int'(b2), 5 * v);
      check("x3 (12 bit)", int'(b3), 3 * v);
      check("x1 (12 bit)", int'(b1_o), v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
