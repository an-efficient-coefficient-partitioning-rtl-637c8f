// cp_mb: multiplier block (MB) of a CP-HCSE filter: the input sample times
// every distinct filter coefficient, without multipliers.
//
// One hs_gen computes the horizontal subexpressions x2 = x1 + x1>>2 and
// x3 = x1 - x1>>2 once; every cp_mult draws its shifted operands from that
// shared set, so the HS adders are paid for once per filter, not per tap.
// Each cp_mult applies the PFP shift and the two-way coefficient partition to
// its own coefficient.
//
// Interface: x1 in, p[i] = h_i * x1 out in units of 2^-COEF_W.
// Defaults: the three distinct 16-digit CSD coefficients of the 6-tap
// linear-phase example filter (h0 = h5, h1 = h4, h2 = h3).
// Timing: combinational; critical path hs_gen + two adder steps per
// multiplier, three adder steps in all for the default coefficients.
module cp_mb
  import cp_pkg::*;
#(
  parameter int W_X    = 8,
  parameter int COEF_W = 16,
  parameter int N_COEF = 3,
  parameter logic [0:N_COEF-1][COEF_W-1:0] H_POS = '{16'h4454, 16'h4150, 16'h4080},
  parameter logic [0:N_COEF-1][COEF_W-1:0] H_NEG = '{16'h0101, 16'h1005, 16'h0802}
) (
  input  logic signed [W_X-1:0]        x1,
  output logic signed [COEF_W+W_X-1:0] p [N_COEF]
);

  logic signed [W_X-1:0] hs_x1;
  logic signed [W_X+2:0] hs_x2;
  logic signed [W_X+2:0] hs_x3;

  hs_gen #(.W_X(W_X)) u_hs (
    .x1   (x1),
    .x1_o (hs_x1),
    .x2   (hs_x2),
    .x3   (hs_x3)
  );

  for (genvar i = 0; i < N_COEF; i++) begin : g_mult
    cp_mult #(
      .W_X    (W_X),
      .COEF_W (COEF_W),
      .H_POS  (H_POS[i]),
      .H_NEG  (H_NEG[i])
    ) u_mult (
      .x1 (hs_x1),
      .x2 (hs_x2),
      .x3 (hs_x3),
      .p  (p[i])
    );
  end

endmodule
