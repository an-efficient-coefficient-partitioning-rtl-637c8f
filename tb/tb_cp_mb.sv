// tb_cp_mb: self-checking test of the multiplier block at its defaults (the
// three distinct coefficients of the 6-tap example filter) and of a second
// block with four hand-picked 12-digit coefficients. Every input value is
// applied and each product compared with h_int * x, h_int being the
// coefficient in units of 2^-COEF_W worked out by hand from its digits.
module tb_cp_mb;

  logic signed [7:0]  x;
  logic signed [23:0] p [3];
  logic signed [19:0] q [4];

  int checks = 0;
  int failures = 0;

  localparam int H16 [3] = '{17235, 12619, 14462};
  // values of the 12-digit words given by the masks of u_12 (POS - NEG)
  localparam int H12 [4] = '{2048 - 512 + 8 - 2, -(1024 + 256) + 16 - 4,
                             85, -1};

  cp_mb u_def (.x1(x), .p(p));

  cp_mb #(
    .W_X(8), .COEF_W(12), .N_COEF(4),
    .H_POS({12'h808, 12'h010, 12'h055, 12'h000}),
    .H_NEG({12'h202, 12'h504, 12'h000, 12'h001})
  ) u_12 (.x1(x), .p(q));

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
    for (int v = -128; v < 128; v++) begin
      x = 8'(v);
      #1;
      for (int i = 0; i < 3; i++)
        check($sformatf("16-digit product %0d x=%0d", i, v), int'(p[i]), H16[i] * v);
      for (int i = 0; i < 4; i++)
        check($sformatf("12-digit product %0d x=%0d", i, v), int'(q[i]), H12[i] * v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
