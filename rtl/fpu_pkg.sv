// fpu_pkg: types and constants shared by the double precision adder/subtractor
// and multiplier.
//
// An IEEE-754 double is 1 sign bit, 11 exponent bits (bias 1023) and 52
// fraction bits. The rounding-mode encoding (00 nearest even, 01 towards zero,
// 10 towards +inf, 11 towards -inf) is the one both units use on their rmode
// input. The quiet NaN returned for every invalid operation is this design's
// own choice of encoding.
package fpu_pkg;

  localparam int EXP_W  = 11;
  localparam int FRAC_W = 52;
  localparam int MANT_W = 53;              // fraction plus the leading bit
  localparam logic [EXP_W-1:0] EXP_MAX = '1;  // all ones: infinity / NaN

  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;

  typedef enum logic [1:0] {
    RM_NEAREST = 2'b00,   // round to nearest, ties to even
    RM_ZERO    = 2'b01,   // truncate
    RM_UP      = 2'b10,   // towards +infinity
    RM_DOWN    = 2'b11    // towards -infinity
  } rmode_e;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp64_t;

  // Operand class, worked out in the pre-normalise stage.
  typedef struct packed {
    logic is_nan;
    logic is_inf;
    logic is_zero;
  } fp_class_t;

  function automatic fp_class_t classify(input fp64_t x);
    fp_class_t c;
    c.is_nan  = (x.exp == EXP_MAX) && (x.frac != '0);
    c.is_inf  = (x.exp == EXP_MAX) && (x.frac == '0);
    c.is_zero = (x.exp == '0)      && (x.frac == '0);
    return c;
  endfunction

  // Significand with its leading bit: 1 for a normal number, 0 for a denormal.
  function automatic logic [MANT_W-1:0] significand(input fp64_t x);
    return {x.exp != '0, x.frac};
  endfunction

  // Exponent a denormal shares with the smallest normal numbers.
  function automatic logic [EXP_W-1:0] eff_exp(input fp64_t x);
    return (x.exp == '0) ? EXP_W'(1) : x.exp;
  endfunction

endpackage
