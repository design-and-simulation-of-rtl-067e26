// fpu_round: rounding and packing step shared by both units.
//
// The post-normalise stage hands over a 56-bit significand word laid out as in
// the multiplier's product_7 register: bit 55 is a 0 that leaves room for the
// carry rounding may produce, bit 54 is the leading bit (1 for a normal result,
// 0 for a denormal), bits 53:2 are the 52 fraction bits, bit 1 is the guard
// bit and bit 0 the sticky bit (OR of everything below). `exp` is the signed
// biased exponent of the leading-bit position and is at least 1; a denormal
// arrives with exp = 1 and a 0 leading bit.
//
// Rounding modes (rmode): 00 nearest-even, 01 towards zero, 10 towards +inf,
// 11 towards -inf, as the document lists them. A carry out of the significand
// shifts right by one and bumps the exponent; a denormal that rounds up to the
// smallest normal gets exponent 1 from its new leading bit. An exponent of
// 2047 or more is an overflow: nearest-even and the mode rounding away from
// zero give infinity, the others the largest finite number (IEEE-754 rule, the
// document only says an overflow indicator is set). Combinational.
module fpu_round
  import fpu_pkg::*;
(
  input  logic              sign,
  input  logic signed [12:0] exp,
  input  logic [55:0]       mant_grs,
  input  logic [1:0]        rmode,
  output logic [63:0]       result,
  output logic              overflow
);
  logic        guard, sticky, lsb, inc;
  logic [55:0] rounded;
  logic [52:0] mant;
  logic signed [12:0] exp_r;
  logic        inf_on_ovf;

  always_comb begin
    guard  = mant_grs[1];
    sticky = mant_grs[0];
    lsb    = mant_grs[2];
    unique case (rmode_e'(rmode))
      RM_NEAREST: inc = guard & (sticky | lsb);
      RM_ZERO:    inc = 1'b0;
      RM_UP:      inc = ~sign & (guard | sticky);
      RM_DOWN:    inc =  sign & (guard | sticky);
      default:    inc = 1'b0;
    endcase

    rounded = mant_grs + {53'd0, inc, 2'b00};
    if (rounded[55]) begin
      mant  = rounded[55:3];
      exp_r = exp + 13'sd1;
    end else begin
      mant  = rounded[54:2];
      exp_r = exp;
    end

    inf_on_ovf = (rmode_e'(rmode) == RM_NEAREST) ||
                 (rmode_e'(rmode) == RM_UP   && !sign) ||
                 (rmode_e'(rmode) == RM_DOWN &&  sign);

    overflow = mant[52] && (exp_r >= 13'sd2047);
    if (overflow) begin
      result = inf_on_ovf ? {sign, 11'h7FF, 52'd0} : {sign, 11'h7FE, {52{1'b1}}};
    end else begin
      result = {sign, mant[52] ? exp_r[10:0] : 11'd0, mant[51:0]};
    end
  end
endmodule
