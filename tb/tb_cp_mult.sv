// tb_cp_mult: self-checking test of the coefficient-partitioned multiplier.
//
// Six multipliers share one hs_gen: the introductory single tap
// h = 0.0000101001010101, the three distinct coefficients of the 6-tap
// example filter, a negative coefficient that uses -x2, x3, -x3 and x1 terms,
// and a single-digit coefficient. Every 8-bit input value is applied and each
// product is compared with h_int * x, where h_int is the coefficient value in
// units of 2^-16 worked out by hand from its digits. The elaborated structure
// is checked too: PFP shift PS1, LSB sub-filter order PS2 and the adder widths
// against the full-adder counts of the method: each adder within one bit of
// its count (16 and 22 for the single tap), and 184 for the whole 6-tap
// multiplier block, which the exact alignment used here reproduces.
module tb_cp_mult;

  localparam int W_X = 8;
  localparam int CW  = 16;
  localparam int NC  = 6;

  logic signed [W_X-1:0]  x1, x1_o;
  logic signed [W_X+2:0]  x2, x3;
  logic signed [CW+W_X-1:0] p [NC];

  int checks = 0;
  int failures = 0;

  hs_gen #(.W_X(W_X)) u_hs (.x1(x1), .x1_o(x1_o), .x2(x2), .x3(x3));

  cp_mult #(.W_X(W_X), .COEF_W(CW), .H_POS(16'h0A55), .H_NEG(16'h0000))
    u_hk (.x1(x1_o), .x2(x2), .x3(x3), .p(p[0]));
  cp_mult #(.W_X(W_X), .COEF_W(CW), .H_POS(16'h4454), .H_NEG(16'h0101))
    u_h0 (.x1(x1_o), .x2(x2), .x3(x3), .p(p[1]));
  cp_mult #(.W_X(W_X), .COEF_W(CW), .H_POS(16'h4150), .H_NEG(16'h1005))
    u_h1 (.x1(x1_o), .x2(x2), .x3(x3), .p(p[2]));
  cp_mult #(.W_X(W_X), .COEF_W(CW), .H_POS(16'h4080), .H_NEG(16'h0802))
    u_h2 (.x1(x1_o), .x2(x2), .x3(x3), .p(p[3]));
  cp_mult #(.W_X(W_X), .COEF_W(CW), .H_POS(16'h0409), .H_NEG(16'hA120))
    u_hn (.x1(x1_o), .x2(x2), .x3(x3), .p(p[4]));
  cp_mult #(.W_X(W_X), .COEF_W(CW), .H_POS(16'h0100), .H_NEG(16'h0000))
    u_hs1 (.x1(x1_o), .x2(x2), .x3(x3), .p(p[5]));

  // coefficient values in units of 2^-16, from the digit strings
  localparam int H_INT [NC] = '{2645, 17235, 12619, 14462, -40215, 256};

  task automatic check_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // adder width against the method's full-adder count: within one bit
  task automatic check_near(string what, int got, int fa);
    checks++;
    if (got > fa + 1 || got < fa - 1) begin
      failures++;
      $display("FAIL %s: %0d bits, %0d full adders expected", what, got, fa);
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
    int fa_mb;
    // structure of the single tap: 2^-5 (x2 + 2^-5 (x2 + 2^-4 x2))
    check_int("hk PS1", u_hk.PS1, 5);
    check_int("hk PS2", u_hk.PS2, 5);
    check_int("hk MSB terms", u_hk.NM, 1);
    check_int("hk LSB terms", u_hk.NL, 2);
    check_int("hk LSB adder width", u_hk.LW, 16);
    check_near("hk final adder width", u_hk.TW, 22);
    // the 6-tap example: every coefficient 2^-2 ( . + 2^-PS2 ( . ) )
    check_int("h0 PS1", u_h0.PS1, 2);  check_int("h0 PS2", u_h0.PS2, 8);
    check_int("h1 PS1", u_h1.PS1, 2);  check_int("h1 PS2", u_h1.PS2, 10);
    check_int("h2 PS1", u_h2.PS1, 2);  check_int("h2 PS2", u_h2.PS2, 7);
    check_near("h0 MSB width", u_h0.MW, 16); check_near("h0 LSB width", u_h0.LW, 16);
    check_near("h0 final width", u_h0.TW, 25);
    check_near("h1 MSB width", u_h1.MW, 18); check_near("h1 LSB width", u_h1.LW, 13);
    check_near("h1 final width", u_h1.TW, 24);
    check_near("h2 MSB width", u_h2.MW, 12); check_near("h2 LSB width", u_h2.LW, 15);
    check_near("h2 final width", u_h2.TW, 23);
    // two HS adders of 11 bits plus nine coefficient adders
    fa_mb = 2 * 11 + u_h0.MW + u_h0.LW + u_h0.TW + u_h1.MW + u_h1.LW + u_h1.TW
                   + u_h2.MW + u_h2.LW + u_h2.TW;
    check_int("multiplier block full adders", fa_mb, 184);
    $display("multiplier block: %0d full adders (bound 184)", fa_mb);

    for (int v = -(1 << (W_X - 1)); v < (1 << (W_X - 1)); v++) begin
      x1 = W_X'(v);
      #1;
      check_int("x2", int'(x2), 5 * v);
      check_int("x3", int'(x3), 3 * v);
      for (int c = 0; c < NC; c++)
        check_int($sformatf("product %0d x=%0d", c, v), int'(p[c]), H_INT[c] * v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
