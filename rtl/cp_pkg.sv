// cp_pkg: shared types and elaboration-time functions of the coefficient-
// partitioned (CP) multiplierless filter.
//
// A filter coefficient is given as a canonic signed digit (CSD) word of CW
// fractional digits, digit p (p = 1..CW) weighing 2^-p. It is passed as two
// masks of CW bits, POS and NEG; digit p sits at bit (CW - p) of each mask, so
// the mask reads left to right like the written CSD word 0.d1 d2 ... dCW and
// the coefficient in units of 2^-CW is simply POS - NEG.
//
// The functions below turn such a word into the multiplier structure that the
// coefficient-partitioning method prescribes, all at elaboration time:
//   1. hcse_terms  - scans the word from the most significant digit and
//                    replaces each [1 0 1] by the horizontal subexpression
//                    x2 = x1 + x1>>2 and each [1 0 -1] by x3 = x1 - x1>>2
//                    (negated patterns become negated terms); other digits
//                    stay plain x1 terms.
//   2. the pseudo floating-point split: the first term's position is the
//      shift PS1, the distance to the last term the span M.
//   3. the partition: terms at most floor(M/2) behind the first one form the
//      MSB sub-filter, the rest the LSB sub-filter, which is rescaled by its
//      own order PS2 (position of its first term).
// Sources x2/x3 are carried as integers with two extra fraction bits
// (x2 = 5*x1 / 4, x3 = 3*x1 / 4); ANCHOR accounts for that when operands are
// aligned. The greedy MSB-first pattern search and the fixed limit of
// MAX_TERMS terms per coefficient are this design's choices.
package cp_pkg;

  typedef enum logic [1:0] {
    SRC_X1 = 2'd0,   // the input sample itself
    SRC_X2 = 2'd1,   // x1 + x1>>2  ([1 0 1])
    SRC_X3 = 2'd2    // x1 - x1>>2  ([1 0 -1])
  } src_e;

  localparam int MAX_TERMS = 32;
  localparam int MAX_CW    = 64;
  localparam int HS_FRAC   = 2;   // fraction bits carried by x2 and x3

  typedef struct packed {
    logic       neg;   // term is subtracted
    src_e       src;   // which source is shifted in
    logic [7:0] pos;   // position p of its leading digit (weight 2^-p)
  } term_t;

  typedef term_t [MAX_TERMS-1:0] term_list_t;

  // Bits a source needs for a W_X-bit input (x2, x3: the HS adder output).
  function automatic int src_width(src_e s, int w_x);
    return (s == SRC_X1) ? w_x : w_x + 3;
  endfunction

  // Fraction bits of a source relative to x1.
  function automatic int src_anchor(src_e s);
    return (s == SRC_X1) ? 0 : HS_FRAC;
  endfunction

  function automatic int imax(int a, int b);
    return (a > b) ? a : b;
  endfunction

  // Bits needed to add n operands without overflow beyond the widest one.
  function automatic int grow_bits(int n);
    return (n <= 1) ? 0 : $clog2(n);
  endfunction

  // CSD digit p (1..cw) as -1, 0 or +1.
  function automatic int csd_digit(logic [MAX_CW-1:0] pm, logic [MAX_CW-1:0] nm,
                                   int cw, int p);
    if (p < 1 || p > cw) return 0;
    if (pm[cw-p]) return 1;
    if (nm[cw-p]) return -1;
    return 0;
  endfunction

  // Step 3 of the procedure: horizontal subexpression identification.
  // With use_hs = 0 every nonzero digit stays a plain term of the source.
  function automatic term_list_t hcse_terms(logic [MAX_CW-1:0] pm,
                                            logic [MAX_CW-1:0] nm, int cw,
                                            bit use_hs);
    term_list_t t;
    int n;
    int p;
    int d0, d1, d2;
    t = '0;
    n = 0;
    p = 1;
    while (p <= cw) begin
      d0 = csd_digit(pm, nm, cw, p);
      d1 = csd_digit(pm, nm, cw, p + 1);
      d2 = csd_digit(pm, nm, cw, p + 2);
      if (d0 == 0) begin
        p = p + 1;
      end else begin
        if (n < MAX_TERMS) begin
          t[n].neg = (d0 < 0);
          t[n].pos = 8'(p);
          if (use_hs && d1 == 0 && d2 != 0) t[n].src = (d2 == d0) ? SRC_X2 : SRC_X3;
          else                              t[n].src = SRC_X1;
        end
        n = n + 1;
        p = (use_hs && d1 == 0 && d2 != 0) ? p + 3 : p + 1;
      end
    end
    return t;
  endfunction

  // Number of terms hcse_terms produces.
  function automatic int hcse_count(logic [MAX_CW-1:0] pm,
                                    logic [MAX_CW-1:0] nm, int cw, bit use_hs);
    int n;
    int p;
    int d0, d1, d2;
    n = 0;
    p = 1;
    while (p <= cw) begin
      d0 = csd_digit(pm, nm, cw, p);
      d1 = csd_digit(pm, nm, cw, p + 1);
      d2 = csd_digit(pm, nm, cw, p + 2);
      if (d0 == 0) begin
        p = p + 1;
      end else begin
        n = n + 1;
        p = (use_hs && d1 == 0 && d2 != 0) ? p + 3 : p + 1;
      end
    end
    return n;
  endfunction

  // True when the masks form a valid CSD word: no digit both +1 and -1 and no
  // two adjacent nonzero digits.
  function automatic bit csd_valid(logic [MAX_CW-1:0] pm, logic [MAX_CW-1:0] nm,
                                   int cw);
    for (int p = 1; p <= cw; p++) begin
      if (pm[cw-p] && nm[cw-p]) return 1'b0;
      if (csd_digit(pm, nm, cw, p) != 0 && csd_digit(pm, nm, cw, p + 1) != 0)
        return 1'b0;
    end
    return 1'b1;
  endfunction

  // Number of terms in the MSB sub-filter: those within floor(span/2) of the
  // first term.
  function automatic int msb_count(term_list_t t, int n);
    int c;
    int span;
    c = 0;
    if (n == 0) return 0;
    span = int'(t[n-1].pos) - int'(t[0].pos);
    for (int i = 0; i < n && i < MAX_TERMS; i++)
      if (int'(t[i].pos) - int'(t[0].pos) <= span / 2) c = c + 1;
    return c;
  endfunction

  // Lowest bit position (fraction bits below the group's reference, the group
  // starting at position ref_pos) over terms lo..hi-1: the alignment of the
  // group's sum.
  function automatic int group_frac(term_list_t t, int lo, int hi, int ref_pos);
    int f;
    f = 0;
    for (int i = lo; i < hi && i < MAX_TERMS; i++)
      f = imax(f, int'(t[i].pos) - ref_pos + src_anchor(t[i].src));
    return f;
  endfunction

  // Width of the sum of terms lo..hi-1 aligned to 'frac' fraction bits.
  function automatic int group_width(term_list_t t, int lo, int hi, int ref_pos,
                                     int frac, int w_x);
    int w;
    w = 1;
    for (int i = lo; i < hi && i < MAX_TERMS; i++)
      w = imax(w, src_width(t[i].src, w_x) + frac
                  - (int'(t[i].pos) - ref_pos + src_anchor(t[i].src)));
    // a lone negated term still needs one bit more: -(-2^(w-1)) = 2^(w-1)
    if (hi - lo == 1 && lo < MAX_TERMS && t[lo].neg) return w + 1;
    return w + grow_bits(hi - lo);
  endfunction

endpackage
