// fpu_addsub: pipelined IEEE-754 double precision adder/subtractor.
//
// One unit does both operations: fpu_op = 0 adds opb to opa, fpu_op = 1
// subtracts it (the sign of opb is flipped and the same datapath is used).
// The work is split into the three pipeline stages the document names, each
// ending in a register, so a new operand pair can enter on every clock:
//   1. pre-normalise: unpack, order the operands by magnitude, shift the
//      fraction of the smaller one right by the exponent difference (three
//      extra bits keep guard, round and sticky information);
//   2. arithmetic core: add or subtract the aligned fractions;
//   3. post-normalise: zero result, fraction overflow (shift right, exponent
//      plus one), left shift of an unnormalised fraction (never below the
//      denormal exponent), then rounding, exponent-overflow handling and
//      packing in fpu_round.
//
// Interface (from the document's block diagram): opa, opb, rmode, clk,
// enable, fpu_op, rst in; out and ready out. enable marks a valid operand pair
// on a clock edge. The three stage registers are loaded on that edge and the
// two after it, so out and ready change on the second edge after the one that
// sampled the operands (a latency of three clock cycles counting the cycle the
// operands are presented in). ready is high for one cycle per result and out
// holds the result until the next one. rst is synchronous and active high and clears out and ready
// (the document: reset 1 means out is zero); it drops operations in flight.
//
// This design's own choices, where the document is silent: NaN inputs and
// inf - inf give the quiet NaN 7FF8_0000_0000_0000; an exact zero from
// cancelling operands is +0, or -0 when rounding towards -inf.
module fpu_addsub
  import fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic [1:0]  rmode,
  input  logic        fpu_op,
  input  logic [63:0] opa,
  input  logic [63:0] opb,
  output logic [63:0] out,
  output logic        ready
);

  // ---------------------------------------------------------------- stage 1
  fp64_t     a, b, greater, lesser;
  fp_class_t ca, cb;
  logic      swap;
  logic [10:0] diff;
  logic [55:0] big_ext, small_ext, small_al;
  logic        s1_nan, s1_inf, s1_inf_sign;

  always_comb begin
    a = fp64_t'(opa);
    b = fp64_t'(opb);
    b.sign = opb[63] ^ fpu_op;
    ca = classify(a);
    cb = classify(b);
    // compare magnitudes; exponent and fraction together order like integers
    swap  = {a.exp, a.frac} < {b.exp, b.frac};
    greater = swap ? b : a;
    lesser  = swap ? a : b;
    diff    = eff_exp(greater) - eff_exp(lesser);
    big_ext   = {significand(greater), 3'b000};
    small_ext = {significand(lesser), 3'b000};
    if (diff >= 11'd56) begin
      small_al = {55'd0, small_ext != '0};
    end else begin
      small_al = small_ext >> diff;
      // bits shifted out collapse into the sticky bit
      small_al[0] = small_al[0] | ((small_ext & ~({56{1'b1}} << diff)) != '0);
    end
    s1_nan      = ca.is_nan | cb.is_nan | (ca.is_inf & cb.is_inf & (a.sign != b.sign));
    s1_inf      = ca.is_inf | cb.is_inf;
    s1_inf_sign = ca.is_inf ? a.sign : b.sign;
  end

  typedef struct packed {
    logic        valid;
    logic [1:0]  rmode;
    logic        sign;       // sign of the larger operand
    logic        eff_sub;    // signs differ: the fractions are subtracted
    logic [10:0] exp;        // exponent of the larger operand (denormal: 1)
    logic [55:0] greater;
    logic [55:0] lesser;
    logic        nan;
    logic        inf;
    logic        inf_sign;
  } s1_t;

  typedef struct packed {
    logic        valid;
    logic [1:0]  rmode;
    logic        sign;
    logic        eff_sub;
    logic [10:0] exp;
    logic [56:0] sum;
    logic        nan;
    logic        inf;
    logic        inf_sign;
  } s2_t;

  s1_t s1_q;
  s2_t s2_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_q.valid <= 1'b0;
    end else begin
      s1_q.valid <= enable;
    end
    if (enable) begin
      s1_q.rmode    <= rmode;
      s1_q.sign     <= greater.sign;
      s1_q.eff_sub  <= a.sign ^ b.sign;
      s1_q.exp      <= eff_exp(greater);
      s1_q.greater  <= big_ext;
      s1_q.lesser   <= small_al;
      s1_q.nan      <= s1_nan;
      s1_q.inf      <= s1_inf;
      s1_q.inf_sign <= s1_inf_sign;
    end
  end

  // ---------------------------------------------------------------- stage 2
  always_ff @(posedge clk) begin
    if (rst) begin
      s2_q.valid <= 1'b0;
    end else begin
      s2_q.valid <= s1_q.valid;
    end
    if (s1_q.valid) begin
      s2_q.rmode    <= s1_q.rmode;
      s2_q.sign     <= s1_q.sign;
      s2_q.eff_sub  <= s1_q.eff_sub;
      s2_q.exp      <= s1_q.exp;
      s2_q.sum      <= s1_q.eff_sub ? ({1'b0, s1_q.greater} - {1'b0, s1_q.lesser})
                                    : ({1'b0, s1_q.greater} + {1'b0, s1_q.lesser});
      s2_q.nan      <= s1_q.nan;
      s2_q.inf      <= s1_q.inf;
      s2_q.inf_sign <= s1_q.inf_sign;
    end
  end

  // ---------------------------------------------------------------- stage 3
  logic [5:0]  lz;
  logic [5:0]  shl;
  logic [55:0] norm;
  logic signed [12:0] norm_exp;
  logic [63:0] rounded, result;
  logic        ovf;

  fpu_lzc #(.W(56), .CW(6)) u_lzc (.value(s2_q.sum[55:0]), .count(lz));

  always_comb begin
    shl = '0;
    if (s2_q.sum[56]) begin
      // fraction overflow: shift right once, keep the lost bit as sticky
      norm     = {s2_q.sum[56:2], s2_q.sum[1] | s2_q.sum[0]};
      norm_exp = 13'(s2_q.exp) + 13'sd1;
    end else begin
      // shift left until normalised, but not below exponent 1 (denormal)
      shl      = (13'(lz) < 13'(s2_q.exp) - 13'sd1) ? lz : 6'(s2_q.exp - 11'd1);
      norm     = s2_q.sum[55:0] << shl;
      norm_exp = 13'(s2_q.exp) - 13'(shl);
    end
  end

  fpu_round u_round (
    .sign     (s2_q.sign),
    .exp      (norm_exp),
    .mant_grs ({1'b0, norm[55:3], norm[2], |norm[1:0]}),
    .rmode    (s2_q.rmode),
    .result   (rounded),
    .overflow (ovf)
  );

  always_comb begin
    if (s2_q.nan) begin
      result = QNAN;
    end else if (s2_q.inf) begin
      result = {s2_q.inf_sign, 11'h7FF, 52'd0};
    end else if (s2_q.sum == '0) begin
      result = {s2_q.eff_sub ? (rmode_e'(s2_q.rmode) == RM_DOWN) : s2_q.sign, 63'd0};
    end else begin
      result = rounded;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ready <= 1'b0;
      out   <= '0;
    end else begin
      ready <= s2_q.valid;
      if (s2_q.valid) out <= result;
    end
  end

endmodule
