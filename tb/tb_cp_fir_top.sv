// tb_cp_fir_top: end-to-end test of both filter realisations at the default
// parameters of the top.
//
// The CP-HCSE and CP-VCSE filters get independent stimulus in the same clock
// cycles: an impulse on each (the response must read back h0..h5), full-scale
// steps and alternations, then random samples with independent random gaps in
// each in_valid, an asynchronous reset in mid-stream, and more random samples.
// A reference per filter keeps its last six accepted samples and forms
// y = sum h_k x[n-k] with h = {17235, 12619, 14462, 14462, 12619, 17235}
// (units of 2^-16, from the CSD digits). Outputs must match one clock after
// their sample and hold while stalled; out_valid must follow in_valid by one
// cycle. Events counted, each of which must occur for each filter: stall
// cycles, the impulse response, the most negative input, a reset while
// running, outputs of both signs.
module tb_cp_fir_top;

  localparam int N = 6;
  localparam int H [N] = '{17235, 12619, 14462, 14462, 12619, 17235};

  logic clk = 1'b0;
  logic rst_n;
  logic hcse_in_valid, vcse_in_valid;
  logic signed [7:0] hcse_x, vcse_x;
  logic hcse_out_valid, vcse_out_valid;
  logic signed [26:0] hcse_y, vcse_y;

  int checks = 0;
  int failures = 0;
  // per filter (0 = HCSE, 1 = VCSE)
  int n_stall [2], n_impulse [2], n_minus [2], n_pos [2], n_neg [2];
  int n_reset = 0;
  int xs [2][N];

  cp_fir_top dut (.*);

  always #5 clk = ~clk;

  function automatic longint ref_y(int f);
    longint s = 0;
    for (int k = 0; k < N; k++) s += longint'(H[k]) * xs[f][k];
    return s;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic accept(int f, bit v, int d);
    if (v) begin
      for (int k = N - 1; k > 0; k--) xs[f][k] = xs[f][k-1];
      xs[f][0] = d;
      if (d == -128) n_minus[f]++;
    end else begin
      n_stall[f]++;
    end
  endtask

  task automatic judge(int f, string name, bit v, longint y, bit ov, longint prev);
    check({name, " out_valid one cycle after in_valid"}, ov, v);
    if (v) begin
      check({name, " output"}, y, ref_y(f));
      if (y > 0) n_pos[f]++;
      if (y < 0) n_neg[f]++;
    end else begin
      check({name, " output held while stalled"}, y, prev);
    end
  endtask

  // one cycle on both filters
  task automatic cycle(bit vh, int dh, bit vv, int dv);
    longint ph, pv;
    @(negedge clk);
    hcse_in_valid = vh;  hcse_x = 8'(dh);
    vcse_in_valid = vv;  vcse_x = 8'(dv);
    ph = hcse_y;
    pv = vcse_y;
    accept(0, vh, dh);
    accept(1, vv, dv);
    @(posedge clk);
    #1;
    judge(0, "HCSE", vh, hcse_y, hcse_out_valid, ph);
    judge(1, "VCSE", vv, vcse_y, vcse_out_valid, pv);
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (xs[f, k]) xs[f][k] = 0;
    for (int f = 0; f < 2; f++) begin
      n_stall[f] = 0; n_impulse[f] = 0; n_minus[f] = 0; n_pos[f] = 0; n_neg[f] = 0;
    end
    rst_n = 1'b0;
    hcse_in_valid = 1'b0; vcse_in_valid = 1'b0;
    hcse_x = '0; vcse_x = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // impulse on both: each output reads back h0 .. h5
    for (int k = 0; k < N; k++) begin
      cycle(1'b1, (k == 0) ? 1 : 0, 1'b1, (k == 0) ? -1 : 0);
      check($sformatf("HCSE impulse tap %0d", k), hcse_y, H[k]);
      check($sformatf("VCSE impulse tap %0d", k), vcse_y, -H[k]);
      n_impulse[0]++;
      n_impulse[1]++;
    end
    for (int k = 0; k < 8; k++) cycle(1'b1, -128, 1'b1, 127);
    for (int k = 0; k < 8; k++) cycle(1'b1, (k % 2) ? -128 : 127, 1'b1, (k % 2) ? 127 : -128);
    for (int k = 0; k < 5000; k++)
      cycle($urandom_range(4) != 0, int'($urandom_range(255)) - 128,
            $urandom_range(3) != 0, int'($urandom_range(255)) - 128);
    // asynchronous reset in mid-stream
    @(negedge clk);
    hcse_in_valid = 1'b0;
    vcse_in_valid = 1'b0;
    #2 rst_n = 1'b0;
    #1;
    check("HCSE output cleared by reset", hcse_y, 0);
    check("VCSE output cleared by reset", vcse_y, 0);
    n_reset++;
    @(negedge clk) rst_n = 1'b1;
    foreach (xs[f, k]) xs[f][k] = 0;
    for (int k = 0; k < 2000; k++)
      cycle($urandom_range(4) != 0, int'($urandom_range(255)) - 128,
            $urandom_range(3) != 0, int'($urandom_range(255)) - 128);

    for (int f = 0; f < 2; f++) begin
      $display("events %s: stalls=%0d impulse_taps=%0d min_inputs=%0d pos=%0d neg=%0d",
               f ? "VCSE" : "HCSE", n_stall[f], n_impulse[f], n_minus[f], n_pos[f], n_neg[f]);
      check("stall cycles occurred", longint'(n_stall[f] > 0), 1);
      check("impulse response observed", n_impulse[f], N);
      check("most negative input applied", longint'(n_minus[f] > 0), 1);
      check("positive outputs occurred", longint'(n_pos[f] > 0), 1);
      check("negative outputs occurred", longint'(n_neg[f] > 0), 1);
    end
    $display("events: resets while running=%0d", n_reset);
    check("reset while running occurred", n_reset, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
