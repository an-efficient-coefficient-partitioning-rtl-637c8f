// cp_mult: multiplierless constant multiplier for one CSD coefficient, built
// with horizontal common subexpressions, pseudo floating-point (PFP) coding
// and coefficient partitioning (CP).
//
// The coefficient h (CSD masks H_POS/H_NEG, see cp_pkg) is rewritten at
// elaboration time as a sum of signed, shifted copies of x1, x2 and x3:
//   h*x = 2^-PS1 * [ sum_MSB(+-x_k 2^-r) + 2^-PS2 * sum_LSB(+-x_k 2^-r') ]
// PS1 (the PFP shift) and PS2 (the order of the LSB sub-filter) are pure
// wiring. Because the LSB sub-filter is summed before it is shifted into
// place, both sub-filter adders only span their own half of the coefficient;
// only the final adder, which joins the two halves, covers the whole span.
// Every adder is sized to exactly the bits its aligned operands occupy plus
// the carry (MW, LW, TW below). The paper sizes each adder as one more than
// its widest operand's "range" measured from the top; the exact alignment used
// here never needs more bits than that bound, sometimes one or two fewer.
//
// A sub-filter with more than two terms is summed as one multi-operand sum
// with ceil(log2(n)) growth bits; the adder tree shape is left to synthesis.
//
// Interface: x1 (W_X bits) and the HS outputs x2, x3 of hs_gen; p = h*x1 in
// units of 2^-COEF_W, i.e. p = (H_POS - H_NEG) * x1 exactly. With USE_HS = 0
// x2 and x3 are ignored and x1 may be any W_X-bit signal.
// Timing: purely combinational, at most three adder steps after hs_gen for a
// coefficient with two terms per half.
module cp_mult
  import cp_pkg::*;
#(
  parameter int                W_X    = 8,
  parameter int                COEF_W = 16,
  // default: the single tap h = 0.0000101001010101 used to introduce CP
  parameter logic [COEF_W-1:0] H_POS  = 16'h0A55,
  parameter logic [COEF_W-1:0] H_NEG  = 16'h0000,
  // 1: replace [1 0 1] / [1 0 -1] by x2 / x3 (CP-HCSE); 0: plain shifted
  // copies of x1 only, for a source that is itself a subexpression (CP-VCSE)
  parameter bit                USE_HS = 1'b1
) (
  input  logic signed [W_X-1:0]        x1,
  input  logic signed [W_X+2:0]        x2,
  input  logic signed [W_X+2:0]        x3,
  output logic signed [COEF_W+W_X-1:0] p
);

  localparam int PW = COEF_W + W_X;

  // ---- structure derived from the coefficient --------------------------------
  localparam term_list_t TL = hcse_terms(MAX_CW'(H_POS), MAX_CW'(H_NEG), COEF_W, USE_HS);
  localparam int NT  = hcse_count(MAX_CW'(H_POS), MAX_CW'(H_NEG), COEF_W, USE_HS);
  localparam int PS1 = (NT > 0) ? int'(TL[0].pos) : 0;         // PFP shift
  localparam int NM  = msb_count(TL, NT);                      // MSB-half terms
  localparam int NL  = NT - NM;                                // LSB-half terms
  localparam int PS2 = (NL > 0) ? int'(TL[NM].pos) - PS1 : 0;  // LSB-half order
  localparam int DM  = group_frac(TL, 0, NM, PS1);
  localparam int MW  = group_width(TL, 0, NM, PS1, DM, W_X);   // MSB adder width
  localparam int DL  = group_frac(TL, NM, NT, PS1 + PS2);
  localparam int LW  = group_width(TL, NM, NT, PS1 + PS2, DL, W_X); // LSB adder
  localparam int E   = PS2 + DL;
  localparam int Q   = (NL > 0) ? imax(DM, E) : DM;
  localparam int TW  = (NL > 0) ? imax(MW + Q - DM, LW + Q - E) + 1 : MW; // final
  localparam int OSH = COEF_W - PS1 - Q;                       // output alignment

  if (!csd_valid(MAX_CW'(H_POS), MAX_CW'(H_NEG), COEF_W)) begin : g_bad_csd
    $error("cp_mult: coefficient masks are not a valid CSD word");
  end
  if (NT > MAX_TERMS) begin : g_too_many
    $error("cp_mult: coefficient has more terms than MAX_TERMS");
  end

  if (NT == 0) begin : g_zero
    // zero coefficient: no adders at all
    assign p = '0;
  end else begin : g_cp
    logic signed [MW-1:0] m_term [NM];
    logic signed [LW-1:0] l_term [(NL > 0) ? NL : 1];
    logic signed [MW-1:0] m_sum;
    logic signed [LW-1:0] l_sum;
    logic signed [TW-1:0] t_sum;
    logic signed [TW+OSH-1:0] t_out;

    // MSB sub-filter operands, aligned to DM fraction bits below 2^-PS1
    for (genvar i = 0; i < NM; i++) begin : g_m
      localparam term_t T  = TL[i];
      localparam int    SH = DM - (int'(T.pos) - PS1 + src_anchor(T.src));
      logic signed [MW-1:0] v;
      if (T.src == SRC_X1)      begin : g_s1 assign v = MW'(x1); end
      else if (T.src == SRC_X2) begin : g_s2 assign v = MW'(x2); end
      else                      begin : g_s3 assign v = MW'(x3); end
      assign m_term[i] = T.neg ? -(v <<< SH) : (v <<< SH);
    end

    // LSB sub-filter operands, already scaled by their order 2^-PS2
    for (genvar i = 0; i < NL; i++) begin : g_l
      localparam term_t T  = TL[NM+i];
      localparam int    SH = DL - (int'(T.pos) - PS1 - PS2 + src_anchor(T.src));
      logic signed [LW-1:0] v;
      if (T.src == SRC_X1)      begin : g_s1 assign v = LW'(x1); end
      else if (T.src == SRC_X2) begin : g_s2 assign v = LW'(x2); end
      else                      begin : g_s3 assign v = LW'(x3); end
      assign l_term[i] = T.neg ? -(v <<< SH) : (v <<< SH);
    end
    if (NL == 0) begin : g_no_lsb
      assign l_term[0] = '0;
    end

    always_comb begin
      m_sum = '0;
      for (int i = 0; i < NM; i++) m_sum = m_sum + m_term[i];
      l_sum = '0;
      for (int i = 0; i < NL; i++) l_sum = l_sum + l_term[i];
    end

    // final adder: the inner shift 2^-PS2 is applied just before it
    if (NL > 0) begin : g_final
      assign t_sum = (TW'(m_sum) <<< (Q - DM)) + (TW'(l_sum) <<< (Q - E));
    end else begin : g_single
      assign t_sum = TW'(m_sum);
    end

    // outer PFP shift 2^-PS1: wiring only
    assign t_out = (TW + OSH)'(t_sum) <<< OSH;
    assign p     = PW'(t_out);
  end

endmodule
