// fpu_lzc: leading-zero counter used by the post-normalise stages.
//
// Counts the zero bits above the most significant one of `value`; an all-zero
// input gives W. Purely combinational. The width is a parameter so that the
// adder (56-bit sum) and the multiplier (106-bit product) share it; the
// document only says the result is shifted left until normalised, the counter
// is this design's way of finding the shift in one step.
module fpu_lzc #(
  parameter int W  = 56,
  parameter int CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  value,
  output logic [CW-1:0] count
);
  always_comb begin
    count = CW'(W);
    for (int i = 0; i < W; i++) begin
      if (value[i]) count = CW'(W - 1 - i);
    end
  end
endmodule
