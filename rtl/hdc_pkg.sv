// hdc_pkg: types, constants and small arithmetic helpers shared by the
// hyperdimensional-computing (HDC) accelerator.
//
// Number formats. Every value the datapath carries is a 32-bit word. The
// reference design uses 32-bit floating point; this RTL uses 32-bit signed
// fixed point with 16 fraction bits (Q15.16) for features, basis entries,
// hypervector elements and class elements, which keeps the word width but
// avoids floating-point units. Angles are unsigned 32-bit "turns": the
// full circle 2*pi maps to 2^32, so wrap-around is free. Dot products are
// accumulated in 64 bits.
package hdc_pkg;

  localparam int unsigned WORD_W = 32;     // width of every data word
  localparam int unsigned FRAC_W = 16;     // fraction bits of a Q15.16 word
  localparam int unsigned ACC_W  = 64;     // dot-product accumulator width

  typedef logic signed [WORD_W-1:0] word_t;   // Q15.16 value
  typedef logic        [WORD_W-1:0] turns_t;  // angle, 2^32 = one full turn
  typedef logic signed [ACC_W-1:0]  acc_t;    // sum of Q.32 products

  // round(2^32 / (2*pi)): converts a Q.32 angle in radians to turns
  localparam logic [31:0] INV_2PI_Q32 = 32'd683565276;

  // Retraining rate alpha = 0.037 in Q15.16 (round(0.037 * 65536))
  localparam word_t ALPHA_Q16 = 32'sd2425;

  // Product of two Q15.16 words, as a Q.32 value in the accumulator width
  function automatic acc_t mul_q(input word_t a, input word_t b);
    return acc_t'(a) * acc_t'(b);
  endfunction

  // Saturating add of two Q15.16 words
  function automatic word_t sat_add(input word_t a, input word_t b);
    logic signed [WORD_W:0] s;
    s = {a[WORD_W-1], a} + {b[WORD_W-1], b};
    if (s > (WORD_W+1)'($signed({2'b00, {(WORD_W-1){1'b1}}})))
      return {1'b0, {(WORD_W-1){1'b1}}};
    else if (s < (WORD_W+1)'($signed({2'b11, {(WORD_W-1){1'b0}}})))
      return {1'b1, {(WORD_W-1){1'b0}}};
    else
      return s[WORD_W-1:0];
  endfunction

  // alpha * h in Q15.16
  function automatic word_t alpha_scale(input word_t h);
    acc_t p;
    p = mul_q(ALPHA_Q16, h);
    return word_t'(p >>> FRAC_W);
  endfunction

endpackage
