// fpu_mul: pipelined IEEE-754 double precision multiplier.
//
// Three pipeline stages, each ending in a register, so a new operand pair can
// enter on every clock:
//   1. pre-normalise: the fractions with their leading bits (1 for normal, 0
//      for denormal numbers) go to the 53-bit registers mul_a and mul_b; the
//      exponents are added and 1022 is subtracted, which is the exponent of
//      a product whose leading one lands in bit 105;
//   2. arithmetic core: mul_core forms the 106-bit product from ten smaller
//      partial products;
//   3. post-normalise: the product is shifted left until its top bit is set;
//      if that would take the exponent below 1 it stops there, and if the
//      exponent is already below 1 the product is shifted right by the
//      difference instead and the result is denormal (exponent field 0).
//      The top 53 bits with a guard and a sticky bit form the 56-bit word
//      product_7 that fpu_round rounds and packs.
//
// Interface (from the document's block diagram): opa, opb, rmode, clk,
// enable, rst in; outfp and ready out. enable marks a valid operand pair on a
// clock edge; outfp and ready change on the second edge after it (three clock
// cycles counting the one the operands are presented in). ready is high for
// one cycle per result and outfp holds the result until the next one.
// rst is synchronous and active high and clears outfp and ready.
//
// This design's own choices, where the document is silent: NaN inputs and
// infinity times zero give the quiet NaN 7FF8_0000_0000_0000; a zero operand
// gives a zero with the XOR of the signs; only the left shift by a leading
// zero count (instead of a single fixed shift) lets denormal operands work.
module fpu_mul
  import fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic [1:0]  rmode,
  input  logic [63:0] opa,
  input  logic [63:0] opb,
  output logic [63:0] outfp,
  output logic        ready
);

  // ---------------------------------------------------------------- stage 1
  fp64_t     a, b;
  fp_class_t ca, cb;

  always_comb begin
    a  = fp64_t'(opa);
    b  = fp64_t'(opb);
    ca = classify(a);
    cb = classify(b);
  end

  typedef struct packed {
    logic        valid;
    logic [1:0]  rmode;
    logic        sign;
    logic signed [12:0] exp;   // exponent of bit 105 of the product
    logic [52:0] mul_a;
    logic [52:0] mul_b;
    logic        nan;
    logic        inf;
    logic        zero;
  } s1_t;

  typedef struct packed {
    logic        valid;
    logic [1:0]  rmode;
    logic        sign;
    logic signed [12:0] exp;
    logic [105:0] product;
    logic        nan;
    logic        inf;
    logic        zero;
  } s2_t;

  s1_t s1_q;
  s2_t s2_q;

  always_ff @(posedge clk) begin
    if (rst) s1_q.valid <= 1'b0;
    else     s1_q.valid <= enable;
    if (enable) begin
      s1_q.rmode <= rmode;
      s1_q.sign  <= a.sign ^ b.sign;
      s1_q.exp   <= 13'(eff_exp(a)) + 13'(eff_exp(b)) - 13'sd1022;
      s1_q.mul_a <= significand(a);
      s1_q.mul_b <= significand(b);
      s1_q.nan   <= ca.is_nan | cb.is_nan | (ca.is_inf & cb.is_zero) | (ca.is_zero & cb.is_inf);
      s1_q.inf   <= ca.is_inf | cb.is_inf;
      s1_q.zero  <= ca.is_zero | cb.is_zero;
    end
  end

  // ---------------------------------------------------------------- stage 2
  logic [105:0] product;

  mul_core u_core (.mul_a(s1_q.mul_a), .mul_b(s1_q.mul_b), .product(product));

  always_ff @(posedge clk) begin
    if (rst) s2_q.valid <= 1'b0;
    else     s2_q.valid <= s1_q.valid;
    if (s1_q.valid) begin
      s2_q.rmode   <= s1_q.rmode;
      s2_q.sign    <= s1_q.sign;
      s2_q.exp     <= s1_q.exp;
      s2_q.product <= product;
      s2_q.nan     <= s1_q.nan;
      s2_q.inf     <= s1_q.inf;
      s2_q.zero    <= s1_q.zero;
    end
  end

  // ---------------------------------------------------------------- stage 3
  logic [6:0]   lz;
  logic signed [12:0] room;      // left shift still allowed: exp - 1
  logic [105:0] norm;
  logic         rs_sticky;
  logic signed [12:0] norm_exp;
  logic [12:0]  rsh;
  logic [55:0]  product_7;
  logic [63:0]  rounded, result;
  logic         ovf;

  fpu_lzc #(.W(106), .CW(7)) u_lzc (.value(s2_q.product), .count(lz));

  always_comb begin
    room      = s2_q.exp - 13'sd1;
    rs_sticky = 1'b0;
    rsh       = '0;
    if (room >= $signed(13'(lz))) begin
      norm     = s2_q.product << lz;
      norm_exp = s2_q.exp - 13'(lz);
    end else if (room >= 0) begin
      norm     = s2_q.product << room;
      norm_exp = 13'sd1;
    end else begin
      // exponent below 1: shift right, the result is denormal
      rsh      = 13'(-room);
      norm_exp = 13'sd1;
      if (rsh >= 13'd106) begin
        norm      = '0;
        rs_sticky = s2_q.product != '0;
      end else begin
        norm      = s2_q.product >> rsh;
        rs_sticky = (s2_q.product & ~({106{1'b1}} << rsh)) != '0;
      end
    end
    product_7 = {1'b0, norm[105:53], norm[52], (|norm[51:0]) | rs_sticky};
  end

  fpu_round u_round (
    .sign     (s2_q.sign),
    .exp      (norm_exp),
    .mant_grs (product_7),
    .rmode    (s2_q.rmode),
    .result   (rounded),
    .overflow (ovf)
  );

  always_comb begin
    if (s2_q.nan)       result = QNAN;
    else if (s2_q.inf)  result = {s2_q.sign, 11'h7FF, 52'd0};
    else if (s2_q.zero) result = {s2_q.sign, 63'd0};
    else                result = rounded;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ready <= 1'b0;
      outfp <= '0;
    end else begin
      ready <= s2_q.valid;
      if (s2_q.valid) outfp <= result;
    end
  end

endmodule
