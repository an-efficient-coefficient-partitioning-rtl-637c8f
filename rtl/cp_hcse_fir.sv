// cp_hcse_fir: linear-phase FIR filter whose coefficient multipliers are built
// from shifts and adds with horizontal common subexpressions, pseudo
// floating-point coefficient coding and coefficient partitioning (CP-HCSE).
//
// Default configuration: the 6-tap Parks-McClellan low-pass example
// (pass band 0.2*pi, stop band 0.25*pi) with 16-digit CSD coefficients
//   h0 = h5 = 0.0100010-1010101-1 (2^-2 + 2^-6 - 2^-8 + 2^-10 + 2^-12 + 2^-14 - 2^-16)
//   h1 = h4 = 0.010-1000101010-10-1
//   h2 = h3 = 0.0100-1000100000-10
// and 8-bit input samples. Datapath:
//   x_in -> cp_mb (hs_gen + one cp_mult per distinct coefficient)
//        -> sym_tdl (transposed delay line, each product used by both
//           symmetric taps) -> y_out
// The multiplier block holds 11 adders (2 HS adders + 3 per coefficient) and
// its critical path is three adder steps.
//
// Interface: one sample per clock while in_valid is high; in_valid low stalls
// the filter (state held, out_valid low next cycle). y_out = sum h_k x[n-k] in
// units of 2^-COEF_W of the input LSB, exact (no rounding); it appears on the
// clock edge that takes x[n], so latency is one cycle. Asynchronous active-low
// reset clears the delay line. The coefficients must be symmetric; this is
// checked at elaboration. Handshake, reset and full-precision output are this
// design's choices.
module cp_hcse_fir
  import cp_pkg::*;
#(
  parameter int                DATA_W = 8,
  parameter int                COEF_W = 16,
  parameter int                N_TAPS = 6,
  parameter logic [0:N_TAPS-1][COEF_W-1:0] H_POS =
    '{16'h4454, 16'h4150, 16'h4080, 16'h4080, 16'h4150, 16'h4454},
  parameter logic [0:N_TAPS-1][COEF_W-1:0] H_NEG =
    '{16'h0101, 16'h1005, 16'h0802, 16'h0802, 16'h1005, 16'h0101},
  parameter int                OUT_W  = DATA_W + COEF_W + $clog2(N_TAPS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_in,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  y_out
);

  localparam int NU = (N_TAPS + 1) / 2;   // distinct coefficients
  localparam int PW = COEF_W + DATA_W;    // product width

  // the distinct coefficients h0 .. h(NU-1)
  localparam logic [0:NU-1][COEF_W-1:0] U_POS = H_POS[0:NU-1];
  localparam logic [0:NU-1][COEF_W-1:0] U_NEG = H_NEG[0:NU-1];

  for (genvar k = 0; k < N_TAPS / 2; k++) begin : g_sym_check
    if (H_POS[k] != H_POS[N_TAPS-1-k] || H_NEG[k] != H_NEG[N_TAPS-1-k]) begin : g_bad
      $error("cp_hcse_fir: coefficients are not symmetric");
    end
  end

  logic signed [PW-1:0] prod [NU];

  cp_mb #(
    .W_X    (DATA_W),
    .COEF_W (COEF_W),
    .N_COEF (NU),
    .H_POS  (U_POS),
    .H_NEG  (U_NEG)
  ) u_mb (
    .x1 (x_in),
    .p  (prod)
  );

  sym_tdl #(
    .N_TAPS (N_TAPS),
    .PW     (PW),
    .OUT_W  (OUT_W),
    .NU     (NU)
  ) u_tdl (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (in_valid),
    .prod    (prod),
    .y       (y_out),
    .y_valid (out_valid)
  );

endmodule
