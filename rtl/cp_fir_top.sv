// cp_fir_top: the two coefficient-partitioned realisations of the 6-tap
// linear-phase low-pass example filter, side by side.
//
//   cp_hcse_fir  horizontal subexpressions (x1 + x1>>2, x1 - x1>>2) inside
//                each coefficient, one CP multiplier per distinct
//                coefficient, symmetric transposed delay line
//   cp_vcse_fir  vertical subexpressions (x1 +/- x1[-1], x1 +/- x1[-2]) across
//                nearby coefficients, CP multipliers for the grouped constants,
//                mirrored half built from delayed products
// Both compute the same y[n] = sum h_k x[n-k] from the same coefficients and
// differ only in how the constant multiplications are broken into adders;
// horizontal grouping suits long coefficient words, vertical grouping short
// ones. Each filter has its own sample input and output so the two can be run
// on different streams; they share clock and reset.
//
// Per filter: one sample per clock while *_in_valid is high, *_y one clock
// later with *_out_valid; outputs are exact, in units of 2^-COEF_W of the
// input LSB. Asynchronous active-low reset.
module cp_fir_top #(
  parameter int DATA_W = 8,
  parameter int COEF_W = 16,
  parameter int OUT_W  = DATA_W + COEF_W + 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // CP-HCSE filter
  input  logic                     hcse_in_valid,
  input  logic signed [DATA_W-1:0] hcse_x,
  output logic                     hcse_out_valid,
  output logic signed [OUT_W-1:0]  hcse_y,
  // CP-VCSE filter
  input  logic                     vcse_in_valid,
  input  logic signed [DATA_W-1:0] vcse_x,
  output logic                     vcse_out_valid,
  output logic signed [OUT_W-1:0]  vcse_y
);

  cp_hcse_fir #(
    .DATA_W (DATA_W),
    .COEF_W (COEF_W),
    .OUT_W  (OUT_W)
  ) u_hcse (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (hcse_in_valid),
    .x_in      (hcse_x),
    .out_valid (hcse_out_valid),
    .y_out     (hcse_y)
  );

  cp_vcse_fir #(
    .DATA_W (DATA_W),
    .COEF_W (COEF_W),
    .OUT_W  (OUT_W)
  ) u_vcse (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (vcse_in_valid),
    .x_in      (vcse_x),
    .out_valid (vcse_out_valid),
    .y_out     (vcse_y)
  );

endmodule
