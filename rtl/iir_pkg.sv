// Shared types and constants of the multiplier-free IIR filter.
//
// Every filter coefficient is a sum of at most two signed power-of-two (SPT)
// terms, so a "multiplication" is two wired shifts and one adder/subtractor.
// A term is {neg, sh} and stands for (neg ? -1 : +1) * 2^-sh.
//
// Number format: W-bit two's complement with the most significant bit at weight
// 2^0, so a word holds a value in [-1, 1) with W-1 fractional bits (17 bits,
// weights 2^0 .. 2^-16, in the main configuration).
//
// Any coefficient of a section may have two terms. The five section
// configurations at the end are the coefficients of the 10th-order low-pass
// Butterworth filter: numerator a0 = a2 = 1/2, a1 = 1 (all zeros at z = -1),
// one-term input scale S and reciprocal 1/b0, two-term b1 and b2.
package iir_pkg;

  // Adder word length of the filter.
  localparam int unsigned W_DEFAULT = 17;

  // One signed power-of-two term: (neg ? -1 : +1) * 2^-sh, 0 <= sh < 16.
  typedef struct packed {
    logic       neg;
    logic [3:0] sh;
  } spt_t;

  // A coefficient of zero, one or two SPT terms: t0 is used when has_t0 is
  // set, t1 when has_t0 and has_t1 are both set.
  typedef struct packed {
    logic has_t0;
    spt_t t0;
    logic has_t1;
    spt_t t1;
  } spt2_t;

  // Configuration of one biquad section
  //   H(z) = S * (a0 + a1 z^-1 + a2 z^-2) / (b0 + b1 z^-1 + b2 z^-2)
  // with S = 2^-s_sh (one term, positive) and 1/b0 given directly (its leading
  // term must be positive).
  typedef struct packed {
    logic [3:0] s_sh;
    spt2_t      b0inv;
    spt2_t      b1;
    spt2_t      b2;
    spt2_t      a0;
    spt2_t      a1;
    spt2_t      a2;
  } biquad_cfg_t;

  localparam spt2_t SPT_ZERO = '0;

  // +/- 2^-sh
  function automatic spt2_t spt1(input bit neg, input logic [3:0] sh);
    spt2_t c;
    c        = '0;
    c.has_t0 = 1'b1;
    c.t0.neg = neg;
    c.t0.sh  = sh;
    return c;
  endfunction

  // +/- 2^-sh0 +/- 2^-sh1
  function automatic spt2_t spt2(input bit neg0, input logic [3:0] sh0,
                                 input bit neg1, input logic [3:0] sh1);
    spt2_t c;
    c        = spt1(neg0, sh0);
    c.has_t1 = 1'b1;
    c.t1.neg = neg1;
    c.t1.sh  = sh1;
    return c;
  endfunction

  // Applying a coefficient c to a word v: the product is
  //   sign * ((v >>> sh0) +/- (v >>> sh1)),
  // the bracket ("magnitude") coming from wired shifts and at most one adder,
  // and sign = -1 when the leading term is negative. The adder that consumes
  // two such signed operands A and B folds the signs in:
  //   sA*A + sB*B = (neg ? -1 : +1) * (swap ? B op A : A op B),
  // op being '-' when sub is set.
  typedef struct packed {
    logic swap;
    logic sub;
    logic neg;
  } fold_t;

  function automatic fold_t fold_signs(input bit neg_a, input bit neg_b);
    fold_t f;
    f.swap = neg_a && !neg_b;
    f.sub  = neg_a != neg_b;
    f.neg  = neg_a && neg_b;
    return f;
  endfunction

  // Sign of a coefficient's leading term (a zero coefficient counts as +).
  function automatic bit coef_neg(input spt2_t c);
    return c.has_t0 && c.t0.neg;
  endfunction

  // Whether the magnitude adder subtracts.
  function automatic bit coef_sub(input spt2_t c);
    return c.has_t0 && c.has_t1 && (c.t1.neg != c.t0.neg);
  endfunction

  function automatic biquad_cfg_t butterworth_section(input logic [3:0] s_sh, input logic [3:0] b0inv_sh,
                                                      input spt2_t b1, input spt2_t b2);
    biquad_cfg_t c;
    c.s_sh  = s_sh;
    c.b0inv = spt1(1'b0, b0inv_sh);
    c.b1    = b1;
    c.b2    = b2;
    c.a0    = spt1(1'b0, 4'd1);   // a0 = 1/2
    c.a1    = spt1(1'b0, 4'd0);   // a1 = 1
    c.a2    = spt1(1'b0, 4'd1);   // a2 = 1/2
    return c;
  endfunction

  // Sections 1..5:   S      1/b0    b1              b2
  //  1              2^-1   1       -1 - 2^-4       1 - 2^-2
  //  2              2^-1   2^-1    -1 - 2^-1       1 - 2^-5
  //  3              2^-1   2^-1    -1 - 2^-1       2^-1 + 2^-5
  //  4              1      2^-1    -1 - 2^-2       2^-2 + 2^-5
  //  5              2^-1   2^-1    -1 - 2^-1       2^-2 + 2^-4
  localparam biquad_cfg_t BQ1 = butterworth_section(1, 0, spt2(1, 0, 1, 4), spt2(0, 0, 1, 2));
  localparam biquad_cfg_t BQ2 = butterworth_section(1, 1, spt2(1, 0, 1, 1), spt2(0, 0, 1, 5));
  localparam biquad_cfg_t BQ3 = butterworth_section(1, 1, spt2(1, 0, 1, 1), spt2(0, 1, 0, 5));
  localparam biquad_cfg_t BQ4 = butterworth_section(0, 1, spt2(1, 0, 1, 2), spt2(0, 2, 0, 5));
  localparam biquad_cfg_t BQ5 = butterworth_section(1, 1, spt2(1, 0, 1, 1), spt2(0, 2, 0, 4));

  // Whole filter, section 1 in element 0.
  localparam int unsigned N_SECTIONS = 5;
  localparam biquad_cfg_t [N_SECTIONS-1:0] BUTTERWORTH10 = {BQ5, BQ4, BQ3, BQ2, BQ1};

endpackage
