// cp_vcse_fir: linear-phase FIR filter whose constant multiplications are
// built from vertical common subexpressions and coefficient partitioning
// (CP-VCSE).
//
// Vertical subexpressions pair equal-position CSD digits of coefficients one
// or two taps apart; vs_gen forms them from the input and its delays:
//   x4 = x1 + x1[-1]  [1 1]      x5 = x1 - x1[-1]  [1 -1]
//   x6 = x1 + x1[-2]  [1 0 1]    x7 = x1 - x1[-2]  [1 0 -1]
// Grouping (elaboration time, function vs_group): taps are scanned from h0
// towards the centre and, in each tap, digits from the most significant one.
// A digit not yet used is paired, in this order of preference, with the same
// digit of the next tap (x4/x5), or, when that one is zero, of the tap after
// it (x6/x7); a digit left alone stays an x1 term. Pairs stay inside the
// first symmetric half, except the pair that straddles the centre
// (h(N/2-1), h(N/2) for even N; h(c-1), h(c+1) around the centre tap c for
// odd N), which is its own mirror image. The centre tap of an odd-length
// filter keeps plain x1 terms. All digits of one source at one delay d form
// one constant C(src, d), which a cp_mult (no horizontal subexpressions)
// multiplies by that source after PFP coding and two-way partitioning.
//
// The second half of the filter is never multiplied: by symmetry the group
// (src, d) of span s reappears at delay N-1-d-s, negated for x5 and x7 whose
// two digits swap places. Products are therefore formed once, on the current
// sample, and added at one or two positions of a transposed chain of
// structural adders:
//   s[N-1] <= inc[N-1];  s[j] <= s[j+1] + inc[j];  y <= s[1] + inc[0]
// where inc[j] sums the products placed at delay j.
//
// The pairing order and the preference for one-tap pairs over two-tap pairs
// are this design's reading of the grouping procedure; the subexpression set,
// the symmetric-half scheme and the partitioning follow the method.
//
// Interface and timing as cp_hcse_fir: one sample per clock while in_valid
// is high, y_out = sum h_k x[n-k] (units of 2^-COEF_W, exact) registered on
// the edge that takes x[n], out_valid one cycle after in_valid, asynchronous
// active-low reset, state held while in_valid is low. The coefficients must
// be symmetric, valid CSD words (both checked at elaboration).
module cp_vcse_fir
  import cp_pkg::*;
#(
  parameter int DATA_W = 8,
  parameter int COEF_W = 16,
  parameter int N_TAPS = 6,
  parameter logic [0:N_TAPS-1][COEF_W-1:0] H_POS =
    '{16'h4454, 16'h4150, 16'h4080, 16'h4080, 16'h4150, 16'h4454},
  parameter logic [0:N_TAPS-1][COEF_W-1:0] H_NEG =
    '{16'h0101, 16'h1005, 16'h0802, 16'h0802, 16'h1005, 16'h0101},
  parameter int OUT_W = DATA_W + COEF_W + $clog2(N_TAPS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_in,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  y_out
);

  localparam int VW   = DATA_W + 1;           // width of the VS sources
  localparam int PW   = COEF_W + VW;          // product width
  localparam int HALF = N_TAPS / 2;           // taps that can be paired
  localparam bit ODD  = (N_TAPS % 2) == 1;
  localparam int ND   = HALF + (ODD ? 1 : 0); // delays that own products
  localparam int NSRC = 5;

  // source index
  localparam int S_X1 = 0, S_X4 = 1, S_X5 = 2, S_X6 = 3, S_X7 = 4;

  function automatic int src_span(int s);
    return (s == S_X1) ? 0 : (s == S_X4 || s == S_X5) ? 1 : 2;
  endfunction

  // +1 if the mirrored group adds its product, -1 if it subtracts it
  function automatic int src_mirror_sign(int s);
    return (s == S_X5 || s == S_X7) ? -1 : 1;
  endfunction

  typedef logic [0:ND-1][0:NSRC-1][COEF_W-1:0] group_words_t;

  function automatic int dig(int k, int p);
    if (k < 0 || k >= N_TAPS || p < 1 || p > COEF_W) return 0;
    if (H_POS[k][COEF_W-p]) return 1;
    if (H_NEG[k][COEF_W-p]) return -1;
    return 0;
  endfunction

  // Digit grouping; want_neg selects the NEG (1) or POS (0) masks.
  function automatic group_words_t vs_group(bit want_neg);
    group_words_t r;
    logic [N_TAPS-1:0][COEF_W:0] used;
    int a, b1, b2, src, partner;
    r = '0;
    used = '0;
    for (int k = 0; k < ND; k++) begin
      for (int p = 1; p <= COEF_W; p++) begin
        a = dig(k, p);
        if (a != 0 && !used[k][p]) begin
          b1 = dig(k + 1, p);
          b2 = dig(k + 2, p);
          src = S_X1;
          partner = -1;
          if (k < HALF) begin
            if (k + 1 <= HALF - 1 && b1 != 0 && !used[k+1][p]) begin
              src = (b1 == a) ? S_X4 : S_X5;        // pair inside the half
              partner = k + 1;
            end else if (!ODD && k == HALF - 1 && b1 != 0) begin
              src = (b1 == a) ? S_X4 : S_X5;        // centre pair, self-mirrored
            end else if (b1 == 0 && k + 2 <= HALF - 1 && b2 != 0 && !used[k+2][p]) begin
              src = (b2 == a) ? S_X6 : S_X7;        // two-tap pair inside the half
              partner = k + 2;
            end else if (ODD && k == HALF - 1 && b1 == 0 && b2 != 0) begin
              src = (b2 == a) ? S_X6 : S_X7;        // around the centre tap
            end
          end
          used[k][p] = 1'b1;
          if (partner >= 0) used[partner][p] = 1'b1;
          if (a > 0 && !want_neg) r[k][src][COEF_W-p] = 1'b1;
          if (a < 0 &&  want_neg) r[k][src][COEF_W-p] = 1'b1;
        end
      end
    end
    return r;
  endfunction

  function automatic bit symmetric();
    for (int k = 0; k < N_TAPS; k++)
      if (H_POS[k] != H_POS[N_TAPS-1-k] || H_NEG[k] != H_NEG[N_TAPS-1-k]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic bit all_csd();
    for (int k = 0; k < N_TAPS; k++)
      if (!csd_valid(MAX_CW'(H_POS[k]), MAX_CW'(H_NEG[k]), COEF_W)) return 1'b0;
    return 1'b1;
  endfunction

  localparam group_words_t G_POS = vs_group(1'b0);
  localparam group_words_t G_NEG = vs_group(1'b1);

  if (!symmetric()) begin : g_bad
    $error("cp_vcse_fir: coefficients are not symmetric");
  end
  if (!all_csd()) begin : g_bad_csd
    $error("cp_vcse_fir: a coefficient is not a valid CSD word");
  end

  // ---- vertical subexpressions ------------------------------------------------
  logic signed [VW-1:0] src_v [NSRC];

  vs_gen #(.W_X(DATA_W)) u_vs (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (in_valid),
    .x1    (x_in),
    .x4    (src_v[S_X4]),
    .x5    (src_v[S_X5]),
    .x6    (src_v[S_X6]),
    .x7    (src_v[S_X7])
  );
  assign src_v[S_X1] = VW'(x_in);

  // ---- one CP multiplier per non-empty group ----------------------------------
  logic signed [PW-1:0] prod [ND][NSRC];
  logic signed [VW+2:0] no_hs;     // HS inputs of cp_mult, unused here
  assign no_hs = '0;

  for (genvar d = 0; d < ND; d++) begin : g_d
    for (genvar s = 0; s < NSRC; s++) begin : g_s
      if ((G_POS[d][s] | G_NEG[d][s]) != '0) begin : g_mult
        cp_mult #(
          .W_X    (VW),
          .COEF_W (COEF_W),
          .H_POS  (G_POS[d][s]),
          .H_NEG  (G_NEG[d][s]),
          .USE_HS (1'b0)
        ) u_mult (
          .x1 (src_v[s]),
          .x2 (no_hs),
          .x3 (no_hs),
          .p  (prod[d][s])
        );
      end else begin : g_none
        assign prod[d][s] = '0;
      end
    end
  end

  // ---- products placed on the delay chain -------------------------------------
  logic signed [OUT_W-1:0] inc [N_TAPS];

  always_comb begin
    int dm;
    for (int j = 0; j < N_TAPS; j++) begin
      inc[j] = '0;
      for (int s = 0; s < NSRC; s++) begin
        if (j < ND) inc[j] = inc[j] + OUT_W'(prod[j][s]);
        dm = N_TAPS - 1 - j - src_span(s);      // group whose mirror lands at j
        if (dm >= 0 && dm < ND && dm != j) begin
          if (src_mirror_sign(s) > 0) inc[j] = inc[j] + OUT_W'(prod[dm][s]);
          else                        inc[j] = inc[j] - OUT_W'(prod[dm][s]);
        end
      end
    end
  end

  // ---- transposed chain of delays and structural adders -----------------------
  logic signed [OUT_W-1:0] s_q [N_TAPS];     // s_q[0] unused

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N_TAPS; j++) s_q[j] <= '0;
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int j = 1; j < N_TAPS - 1; j++) s_q[j] <= s_q[j+1] + inc[j];
        if (N_TAPS > 1) begin
          s_q[N_TAPS-1] <= inc[N_TAPS-1];
          y_out         <= s_q[1] + inc[0];
        end else begin
          y_out         <= inc[0];
        end
      end
    end
  end

endmodule
