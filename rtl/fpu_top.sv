// fpu_top: the double precision adder/subtractor and multiplier side by side.
//
// Both units share the clock and the synchronous, active-high reset; each
// keeps its own operands, rounding mode, enable and result ports (prefixed
// add_ and mul_), so an addition or subtraction and a multiplication can be
// issued on the same clock. Each unit accepts one operation per clock and
// answers two clock edges after the edge that sampled the operands, with its
// ready output high for one cycle.
module fpu_top (
  input  logic        clk,
  input  logic        rst,
  // adder/subtractor
  input  logic        add_enable,
  input  logic [1:0]  add_rmode,
  input  logic        add_fpu_op,
  input  logic [63:0] add_opa,
  input  logic [63:0] add_opb,
  output logic [63:0] add_out,
  output logic        add_ready,
  // multiplier
  input  logic        mul_enable,
  input  logic [1:0]  mul_rmode,
  input  logic [63:0] mul_opa,
  input  logic [63:0] mul_opb,
  output logic [63:0] mul_outfp,
  output logic        mul_ready
);
  fpu_addsub u_addsub (
    .clk, .rst,
    .enable (add_enable),
    .rmode  (add_rmode),
    .fpu_op (add_fpu_op),
    .opa    (add_opa),
    .opb    (add_opb),
    .out    (add_out),
    .ready  (add_ready)
  );

  fpu_mul u_mul (
    .clk, .rst,
    .enable (mul_enable),
    .rmode  (mul_rmode),
    .opa    (mul_opa),
    .opb    (mul_opb),
    .outfp  (mul_outfp),
    .ready  (mul_ready)
  );
endmodule
