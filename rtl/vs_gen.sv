// vs_gen: vertical subexpression (VS) adders of a CP-VCSE filter.
//
// Vertical subexpressions pair the same CSD digit of two coefficients that
// are one or two taps apart. In a filter they become sums of the input and
// its delayed copies:
//   [1  1]    ->  x4 = x1 + x1[-1]
//   [1 -1]    ->  x5 = x1 - x1[-1]
//   [1 0  1]  ->  x6 = x1 + x1[-2]
//   [1 0 -1]  ->  x7 = x1 - x1[-2]
// The module holds the two-sample delay line of x1 and the four W_X+1 bit
// adders; the delay line advances when 'en' is high and clears on rst_n low
// (asynchronous). x4..x7 are combinational from x1 and the delay registers,
// so they are valid in the same cycle as x1.
module vs_gen #(
  parameter int W_X = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic signed [W_X-1:0] x1,
  output logic signed [W_X:0]   x4,   // x1 + x1[-1]
  output logic signed [W_X:0]   x5,   // x1 - x1[-1]
  output logic signed [W_X:0]   x6,   // x1 + x1[-2]
  output logic signed [W_X:0]   x7    // x1 - x1[-2]
);

  logic signed [W_X-1:0] x1_d1;   // x1[-1]
  logic signed [W_X-1:0] x1_d2;   // x1[-2]

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1_d1 <= '0;
      x1_d2 <= '0;
    end else if (en) begin
      x1_d1 <= x1;
      x1_d2 <= x1_d1;
    end
  end

  always_comb begin
    x4 = (W_X+1)'(x1) + (W_X+1)'(x1_d1);
    x5 = (W_X+1)'(x1) - (W_X+1)'(x1_d1);
    x6 = (W_X+1)'(x1) + (W_X+1)'(x1_d2);
    x7 = (W_X+1)'(x1) - (W_X+1)'(x1_d2);
  end

endmodule
