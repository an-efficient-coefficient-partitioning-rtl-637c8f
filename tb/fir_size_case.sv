// fir_size_case: one size configuration of a CP filter driven and checked on
// its own, for the size-sweep testbench. VCSE = 0 selects cp_hcse_fir,
// VCSE = 1 selects cp_vcse_fir.
//
// The filter gets N_TAPS symmetric CSD coefficients of COEF_W digits made by
// a fixed pseudo-random generator (a 32-bit linear congruential sequence
// seeded by SEED): each digit is nonzero with probability about 3/8 when the
// digit before it is zero, with a random sign, which keeps the word canonic.
// Random 8-bit samples, including the most negative one, are fed with random
// stalls; a reference forms y = sum h_k x[n-k] from h_k = POS_k - NEG_k and
// compares every output one clock after its sample. 'done' rises after
// N_SAMPLES samples; checks and failures are counted in the outputs.
module fir_size_case #(
  parameter int N_TAPS    = 10,
  parameter int COEF_W    = 16,
  parameter int SEED      = 1,
  parameter int N_SAMPLES = 1000,
  parameter bit VCSE      = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);

  typedef logic [0:N_TAPS-1][COEF_W-1:0] coef_set_t;

  // neg = 0: positive-digit masks, neg = 1: negative-digit masks
  function automatic coef_set_t gen(bit neg);
    coef_set_t r;
    logic [31:0] s;
    int prev;
    int d;
    r = '0;
    s = 32'(SEED) * 32'd2654435761 + 32'd12345;
    for (int k = 0; k < (N_TAPS + 1) / 2; k++) begin
      prev = 0;
      for (int p = 1; p <= COEF_W; p++) begin
        s = s * 32'd1664525 + 32'd1013904223;
        d = 0;
        if (prev == 0 && s[31:29] < 3'd3) d = s[28] ? -1 : 1;
        if (d > 0 && !neg) r[k][COEF_W-p] = 1'b1;
        if (d < 0 &&  neg) r[k][COEF_W-p] = 1'b1;
        prev = d;
      end
      r[N_TAPS-1-k] = r[k];
    end
    return r;
  endfunction

  localparam coef_set_t HP = gen(1'b0);
  localparam coef_set_t HN = gen(1'b1);
  localparam int OUT_W = 8 + COEF_W + $clog2(N_TAPS);

  logic in_valid;
  logic signed [7:0] x_in;
  logic out_valid;
  logic signed [OUT_W-1:0] y_out;

  if (VCSE) begin : g_vcse
    cp_vcse_fir #(
      .DATA_W (8),
      .COEF_W (COEF_W),
      .N_TAPS (N_TAPS),
      .H_POS  (HP),
      .H_NEG  (HN)
    ) dut (.*);
  end else begin : g_hcse
    cp_hcse_fir #(
      .DATA_W (8),
      .COEF_W (COEF_W),
      .N_TAPS (N_TAPS),
      .H_POS  (HP),
      .H_NEG  (HN)
    ) dut (.*);
  end

  longint h [N_TAPS];
  longint xs [N_TAPS];

  function automatic longint ref_y();
    longint s = 0;
    for (int k = 0; k < N_TAPS; k++) s += h[k] * xs[k];
    return s;
  endfunction

  initial begin
    int d;
    bit v;
    longint prev;
    done = 1'b0;
    checks = 0;
    failures = 0;
    in_valid = 1'b0;
    x_in = '0;
    for (int k = 0; k < N_TAPS; k++) begin
      h[k] = longint'(HP[k]) - longint'(HN[k]);
      xs[k] = 0;
    end
    wait (rst_n === 1'b1);
    for (int n = 0; n < N_SAMPLES; ) begin
      @(negedge clk);
      v = ($urandom_range(4) != 0);
      d = (n % 97 == 3) ? -128 : int'($urandom_range(255)) - 128;
      in_valid = v;
      x_in = 8'(d);
      prev = y_out;
      if (v) begin
        for (int k = N_TAPS - 1; k > 0; k--) xs[k] = xs[k-1];
        xs[0] = d;
        n++;
      end
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== v) failures++;
      checks++;
      if (v ? (y_out != ref_y()) : (y_out != prev)) begin
        failures++;
        if (failures < 5)
          $display("FAIL %s N=%0d W=%0d: got %0d expected %0d", VCSE ? "VCSE" : "HCSE",
                   N_TAPS, COEF_W, y_out,
                   v ? ref_y() : prev);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    done = 1'b1;
  end

endmodule
