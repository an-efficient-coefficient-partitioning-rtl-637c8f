// hs_gen: horizontal subexpression (HS) adders shared by all coefficient
// multipliers of a filter.
//
// The two most frequent two-digit CSD patterns are computed once from the
// input sample x1:
//   [1 0  1]  ->  x2 = x1 + x1>>2
//   [1 0 -1]  ->  x3 = x1 - x1>>2
// Nothing is dropped by the right shift: x2 and x3 are returned as integers
// that carry two fraction bits, i.e. x2 = 5*x1 (value 5*x1/4) and
// x3 = 3*x1 (value 3*x1/4). Each is one W_X+3 bit adder, the width a
// W_X-bit and a right-shifted W_X-bit operand need. Purely combinational;
// x1 is passed through for the multipliers that use it directly.
module hs_gen #(
  parameter int W_X = 8        // input sample width (two's complement)
) (
  input  logic signed [W_X-1:0] x1,
  output logic signed [W_X-1:0] x1_o,   // x1, for plain-digit terms
  output logic signed [W_X+2:0] x2,     // (x1<<2) + x1, two fraction bits
  output logic signed [W_X+2:0] x3      // (x1<<2) - x1, two fraction bits
);

  logic signed [W_X+2:0] x1_ext;
  logic signed [W_X+2:0] x1_sh;

  always_comb begin
    x1_ext = (W_X+3)'(x1);
    x1_sh  = x1_ext <<< 2;
    x2     = x1_sh + x1_ext;
    x3     = x1_sh - x1_ext;
    x1_o   = x1;
  end

endmodule
