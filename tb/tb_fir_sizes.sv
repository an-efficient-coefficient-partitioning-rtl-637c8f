// tb_fir_sizes: the CP-HCSE and CP-VCSE filters at the sizes of the FIR
// evaluation: filter lengths 10 to 400 taps and coefficient word lengths of
// 8 to 24 digits, plus odd and very short lengths, and the sizes of three
// filters of the signed-subexpression comparison (17 taps / 16 digits,
// 26 / 9, 61 / 14).
// The low-pass coefficient sets themselves are not reproduced; each case
// uses generated symmetric CSD coefficients of the stated length and word
// length (see fir_size_case), which exercises the same elaboration of
// subexpressions, PFP shifts and partitions. Every case must finish with all
// outputs matching its reference.
module tb_fir_sizes;

  localparam int NC = 25;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic done [NC];
  int   c_checks [NC];
  int   c_fail [NC];

  always #5 clk = ~clk;

  fir_size_case #(.N_TAPS(10), .COEF_W(8), .SEED(11), .VCSE(1'b0)) u_h_10_8 (.clk, .rst_n, .done(done[0]), .checks(c_checks[0]), .failures(c_fail[0]));
  fir_size_case #(.N_TAPS(30), .COEF_W(12), .SEED(12), .VCSE(1'b0)) u_h_30_12 (.clk, .rst_n, .done(done[1]), .checks(c_checks[1]), .failures(c_fail[1]));
  fir_size_case #(.N_TAPS(50), .COEF_W(16), .SEED(13), .VCSE(1'b0)) u_h_50_16 (.clk, .rst_n, .done(done[2]), .checks(c_checks[2]), .failures(c_fail[2]));
  fir_size_case #(.N_TAPS(80), .COEF_W(20), .SEED(14), .VCSE(1'b0)) u_h_80_20 (.clk, .rst_n, .done(done[3]), .checks(c_checks[3]), .failures(c_fail[3]));
  fir_size_case #(.N_TAPS(120), .COEF_W(24), .SEED(15), .VCSE(1'b0)) u_h_120_24 (.clk, .rst_n, .done(done[4]), .checks(c_checks[4]), .failures(c_fail[4]));
  fir_size_case #(.N_TAPS(250), .COEF_W(16), .SEED(16), .VCSE(1'b0)) u_h_250_16 (.clk, .rst_n, .done(done[5]), .checks(c_checks[5]), .failures(c_fail[5]));
  fir_size_case #(.N_TAPS(400), .COEF_W(16), .SEED(17), .VCSE(1'b0)) u_h_400_16 (.clk, .rst_n, .done(done[6]), .checks(c_checks[6]), .failures(c_fail[6]));
  fir_size_case #(.N_TAPS(25), .COEF_W(16), .SEED(18), .VCSE(1'b0)) u_h_25_16 (.clk, .rst_n, .done(done[7]), .checks(c_checks[7]), .failures(c_fail[7]));
  fir_size_case #(.N_TAPS(101), .COEF_W(12), .SEED(19), .VCSE(1'b0)) u_h_101_12 (.clk, .rst_n, .done(done[8]), .checks(c_checks[8]), .failures(c_fail[8]));
  fir_size_case #(.N_TAPS(2), .COEF_W(8), .SEED(21), .VCSE(1'b1)) u_v_2_8 (.clk, .rst_n, .done(done[9]), .checks(c_checks[9]), .failures(c_fail[9]));
  fir_size_case #(.N_TAPS(3), .COEF_W(8), .SEED(22), .VCSE(1'b1)) u_v_3_8 (.clk, .rst_n, .done(done[10]), .checks(c_checks[10]), .failures(c_fail[10]));
  fir_size_case #(.N_TAPS(10), .COEF_W(8), .SEED(23), .VCSE(1'b1)) u_v_10_8 (.clk, .rst_n, .done(done[11]), .checks(c_checks[11]), .failures(c_fail[11]));
  fir_size_case #(.N_TAPS(11), .COEF_W(8), .SEED(24), .VCSE(1'b1)) u_v_11_8 (.clk, .rst_n, .done(done[12]), .checks(c_checks[12]), .failures(c_fail[12]));
  fir_size_case #(.N_TAPS(30), .COEF_W(12), .SEED(25), .VCSE(1'b1)) u_v_30_12 (.clk, .rst_n, .done(done[13]), .checks(c_checks[13]), .failures(c_fail[13]));
  fir_size_case #(.N_TAPS(51), .COEF_W(16), .SEED(26), .VCSE(1'b1)) u_v_51_16 (.clk, .rst_n, .done(done[14]), .checks(c_checks[14]), .failures(c_fail[14]));
  fir_size_case #(.N_TAPS(80), .COEF_W(20), .SEED(27), .VCSE(1'b1)) u_v_80_20 (.clk, .rst_n, .done(done[15]), .checks(c_checks[15]), .failures(c_fail[15]));
  fir_size_case #(.N_TAPS(120), .COEF_W(24), .SEED(28), .VCSE(1'b1)) u_v_120_24 (.clk, .rst_n, .done(done[16]), .checks(c_checks[16]), .failures(c_fail[16]));
  fir_size_case #(.N_TAPS(250), .COEF_W(16), .SEED(29), .VCSE(1'b1)) u_v_250_16 (.clk, .rst_n, .done(done[17]), .checks(c_checks[17]), .failures(c_fail[17]));
  fir_size_case #(.N_TAPS(400), .COEF_W(16), .SEED(30), .VCSE(1'b1)) u_v_400_16 (.clk, .rst_n, .done(done[18]), .checks(c_checks[18]), .failures(c_fail[18]));
  fir_size_case #(.N_TAPS(17), .COEF_W(16), .SEED(31), .VCSE(1'b0)) u_h_17_16 (.clk, .rst_n, .done(done[19]), .checks(c_checks[19]), .failures(c_fail[19]));
  fir_size_case #(.N_TAPS(26), .COEF_W(9), .SEED(32), .VCSE(1'b0)) u_h_26_9 (.clk, .rst_n, .done(done[20]), .checks(c_checks[20]), .failures(c_fail[20]));
  fir_size_case #(.N_TAPS(61), .COEF_W(14), .SEED(33), .VCSE(1'b0)) u_h_61_14 (.clk, .rst_n, .done(done[21]), .checks(c_checks[21]), .failures(c_fail[21]));
  fir_size_case #(.N_TAPS(17), .COEF_W(16), .SEED(41), .VCSE(1'b1)) u_v_17_16 (.clk, .rst_n, .done(done[22]), .checks(c_checks[22]), .failures(c_fail[22]));
  fir_size_case #(.N_TAPS(26), .COEF_W(9), .SEED(42), .VCSE(1'b1)) u_v_26_9 (.clk, .rst_n, .done(done[23]), .checks(c_checks[23]), .failures(c_fail[23]));
  fir_size_case #(.N_TAPS(61), .COEF_W(14), .SEED(43), .VCSE(1'b1)) u_v_61_14 (.clk, .rst_n, .done(done[24]), .checks(c_checks[24]), .failures(c_fail[24]));

  function automatic bit all_done();
    for (int i = 0; i < NC; i++) if (!done[i]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic report(bit timeout);
    int checks = 0;
    int failures = timeout ? 1 : 0;
    for (int i = 0; i < NC; i++) begin
      checks += c_checks[i];
      failures += c_fail[i];
      if (!done[i]) failures++;
    end
    if (timeout) $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    report(1'b1);
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (!all_done()) @(posedge clk);
    report(1'b0);
  end

endmodule
