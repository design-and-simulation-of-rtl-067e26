// mul_core: 53 x 53-bit unsigned significand multiplier of the floating point
// multiplier's arithmetic-core stage.
//
// The multiply is split into ten smaller products sized for 25 x 18 DSP
// multipliers, exactly as the document breaks it down:
//   product_a = mul_a[23:0]  * mul_b[16:0]    weight 2^0
//   product_b = mul_a[23:0]  * mul_b[33:17]   weight 2^17
//   product_c = mul_a[23:0]  * mul_b[50:34]   weight 2^34
//   product_d = mul_a[23:0]  * mul_b[52:51]   weight 2^51
//   product_e = mul_a[40:24] * mul_b[16:0]    weight 2^24
//   product_f = mul_a[40:24] * mul_b[33:17]   weight 2^41
//   product_g = mul_a[40:24] * mul_b[52:34]   weight 2^58
//   product_h = mul_a[52:41] * mul_b[16:0]    weight 2^41
//   product_i = mul_a[52:41] * mul_b[33:17]   weight 2^58
//   product_j = mul_a[52:41] * mul_b[52:34]   weight 2^75
// and, as the document describes, they are summed one at a time, each added
// to the running sum of the ones before it, giving the 106-bit product.
// Purely combinational; the enclosing unit registers inputs and result.
module mul_core (
  input  logic [52:0]  mul_a,
  input  logic [52:0]  mul_b,
  output logic [105:0] product
);
  logic [40:0] product_a, product_b, product_c;
  logic [25:0] product_d;
  logic [33:0] product_e, product_f;
  logic [35:0] product_g;
  logic [28:0] product_h, product_i;
  logic [30:0] product_j;

  always_comb begin
    product_a = 41'(mul_a[23:0])  * 41'(mul_b[16:0]);
    product_b = 41'(mul_a[23:0])  * 41'(mul_b[33:17]);
    product_c = 41'(mul_a[23:0])  * 41'(mul_b[50:34]);
    product_d = 26'(mul_a[23:0])  * 26'(mul_b[52:51]);
    product_e = 34'(mul_a[40:24]) * 34'(mul_b[16:0]);
    product_f = 34'(mul_a[40:24]) * 34'(mul_b[33:17]);
    product_g = 36'(mul_a[40:24]) * 36'(mul_b[52:34]);
    product_h = 29'(mul_a[52:41]) * 29'(mul_b[16:0]);
    product_i = 29'(mul_a[52:41]) * 29'(mul_b[33:17]);
    product_j = 31'(mul_a[52:41]) * 31'(mul_b[52:34]);

    product = 106'(product_a);
    product = product + (106'(product_b) << 17);
    product = product + (106'(product_c) << 34);
    product = product + (106'(product_d) << 51);
    product = product + (106'(product_e) << 24);
    product = product + (106'(product_f) << 41);
    product = product + (106'(product_g) << 58);
    product = product + (106'(product_h) << 41);
    product = product + (106'(product_i) << 58);
    product = product + (106'(product_j) << 75);
  end
endmodule
