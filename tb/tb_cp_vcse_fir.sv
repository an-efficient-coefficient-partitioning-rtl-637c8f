// tb_cp_vcse_fir: end-to-end test of the 6-tap CP-VCSE FIR filter at its
// default parameters.
//
// Stimulus, in order: an impulse (the response must read back the six
// coefficients h0..h5), a step at full negative scale, a full-scale
// alternating sequence, then random samples with random gaps in in_valid,
// an asynchronous reset in the middle of the stream, and random samples again.
// A reference model keeps the last six accepted samples and forms
// y = sum h_k x[n-k] with h = {17235, 12619, 14462, 14462, 12619, 17235}
// (units of 2^-16, from the CSD digit strings). Every output must match one
// clock after its sample is taken (out_valid follows in_valid by exactly one
// cycle) and must hold while in_valid is low.
// Events counted, each of which must occur: stall cycles, impulse taps seen,
// most negative input, reset while running, outputs of each sign.
module tb_cp_vcse_fir;

  localparam int N = 6;
  localparam int H [N] = '{17235, 12619, 14462, 14462, 12619, 17235};

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic signed [7:0] x_in;
  logic out_valid;
  logic signed [26:0] y_out;

  int checks = 0;
  int failures = 0;
  int n_stall = 0, n_impulse = 0, n_minus = 0, n_reset = 0, n_pos = 0, n_neg = 0;

  int xs [N];                 // accepted samples, newest first

  cp_vcse_fir dut (.*);

  always #5 clk = ~clk;

  function automatic longint ref_y();
    longint s = 0;
    for (int k = 0; k < N; k++) s += longint'(H[k]) * xs[k];
    return s;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // apply one cycle; v = in_valid, d = sample
  task automatic cycle(bit v, int d);
    longint prev;
    @(negedge clk);
    in_valid = v;
    x_in = 8'(d);
    prev = y_out;
    if (v) begin
      for (int k = N - 1; k > 0; k--) xs[k] = xs[k-1];
      xs[0] = d;
      if (d == -128) n_minus++;
    end else begin
      n_stall++;
    end
    @(posedge clk);
    #1;
    check("out_valid one cycle after in_valid", out_valid, v);
    if (v) begin
      check("filter output", y_out, ref_y());
      if (y_out > 0) n_pos++;
      if (y_out < 0) n_neg++;
    end else begin
      check("output held while stalled", y_out, prev);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (xs[k]) xs[k] = 0;
    rst_n = 1'b0;
    in_valid = 1'b0;
    x_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // impulse: the output reads back h0 .. h5
    for (int k = 0; k < N; k++) begin
      cycle(1'b1, (k == 0) ? 1 : 0);
      check($sformatf("impulse response tap %0d", k), y_out, H[k]);
      n_impulse++;
    end
    // step at the most negative input, then alternating full scale
    for (int k = 0; k < 8; k++) cycle(1'b1, -128);
    for (int k = 0; k < 8; k++) cycle(1'b1, (k % 2) ? -128 : 127);
    // random samples with gaps
    for (int k = 0; k < 3000; k++)
      cycle($urandom_range(4) != 0, int'($urandom_range(255)) - 128);
    // asynchronous reset while running clears the delay line
    @(negedge clk);
    in_valid = 1'b0;
    #2 rst_n = 1'b0;
    #1;
    check("output cleared by reset", y_out, 0);
    check("out_valid cleared by reset", out_valid, 0);
    n_reset++;
    @(negedge clk) rst_n = 1'b1;
    foreach (xs[k]) xs[k] = 0;
    for (int k = 0; k < 1000; k++)
      cycle($urandom_range(4) != 0, int'($urandom_range(255)) - 128);

    $display("events: stalls=%0d impulse_taps=%0d min_inputs=%0d resets=%0d pos=%0d neg=%0d",
             n_stall, n_impulse, n_minus, n_reset, n_pos, n_neg);
    check("stall cycles occurred", longint'(n_stall > 0), 1);
    check("impulse taps observed", n_impulse, N);
    check("most negative input applied", longint'(n_minus > 0), 1);
    check("reset while running occurred", n_reset, 1);
    check("positive outputs occurred", longint'(n_pos > 0), 1);
    check("negative outputs occurred", longint'(n_neg > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
