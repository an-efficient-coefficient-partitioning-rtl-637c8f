// tb_sym_tdl: self-checking test of the symmetric transposed delay line.
// Two instances, 6 taps (3 distinct products) and 5 taps (3 distinct
// products, odd centre tap), are fed random products with a random enable.
// A reference keeps the product sets of the enabled cycles and forms
// y[n] = sum_k prod[min(k, N-1-k)][n-k]; the output must match it one clock
// after each enabled cycle, y_valid must follow the enable with one cycle of
// latency, and disabled cycles must hold the state.
module tb_sym_tdl;

  localparam int PW = 24;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  logic signed [PW-1:0] pr [3];
  logic signed [PW+2:0] y6, y5;
  logic v6, v5;

  int checks = 0;
  int failures = 0;
  int held = 0;

  sym_tdl #(.N_TAPS(6), .PW(PW)) u6 (.clk, .rst_n, .en, .prod(pr), .y(y6), .y_valid(v6));
  sym_tdl #(.N_TAPS(5), .PW(PW), .OUT_W(PW + 3)) u5
    (.clk, .rst_n, .en, .prod(pr), .y(y5), .y_valid(v5));

  always #5 clk = ~clk;

  // history of enabled product sets, newest first
  longint hist [8][3];

  function automatic longint ref_y(int n);
    longint s = 0;
    for (int k = 0; k < n; k++)
      s += hist[k][(k < (n + 1) / 2) ? k : n - 1 - k];
    return s;
  endfunction

  task automatic check(string what, longint got, longint exp);
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
    longint prev6, prev5;
    bit was_en;
    foreach (hist[i, j]) hist[i][j] = 0;
    rst_n = 1'b0;
    en = 1'b0;
    foreach (pr[i]) pr[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check("y after reset", y6, 0);
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      en = ($urandom_range(3) != 0);
      foreach (pr[i]) pr[i] = PW'($urandom_range(32'h00FF_FFFF)) - PW'(24'h80_0000);
      if (cyc % 97 == 0) pr[0] = PW'(24'h80_0000);   // most negative product
      was_en = en;
      prev6 = y6;
      prev5 = y5;
      if (en) begin
        for (int k = 7; k > 0; k--) hist[k] = hist[k-1];
        foreach (pr[i]) hist[0][i] = pr[i];
      end
      @(posedge clk);
      #1;
      check("y_valid follows enable (6 taps)", v6, was_en);
      check("y_valid follows enable (5 taps)", v5, was_en);
      if (was_en) begin
        check("6-tap output", y6, ref_y(6));
        check("5-tap output", y5, ref_y(5));
      end else begin
        held++;
        check("6-tap output held", y6, prev6);
        check("5-tap output held", y5, prev5);
      end
    end
    check("enable was low at least once", longint'(held > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
