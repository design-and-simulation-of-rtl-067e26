// tb_fpu_round: checks the rounding/packing step in all four modes.
//
// The 56-bit input word {0, leading bit, 52 fraction bits, guard, sticky}
// with exponent e stands for the exact value {leading, fraction, guard,
// sticky} * 2^(e - 1077) (a set sticky bit behaves like any non-zero tail).
// The reference model rounds that value by its own method; results and the
// overflow flag are compared. Cases cover ties, carries that ripple into the
// exponent, denormals becoming normal, and exponent overflow.
module tb_fpu_round;
  import fp_ref_pkg::*;

  logic              sign;
  logic signed [12:0] exp;
  logic [55:0]       mant_grs;
  logic [1:0]        rmode;
  logic [63:0]       result;
  logic              overflow;
  int checks = 0, failures = 0;

  fpu_round dut (.sign, .exp, .mant_grs, .rmode, .result, .overflow);

  task automatic check(bit s, int e, logic [52:0] m, bit g, bit st, bit [1:0] rm);
    logic [63:0] expect_r;
    bit expect_ovf;
    sign = s; exp = 13'(e); mant_grs = {1'b0, m, g, st}; rmode = rm;
    #1;
    if ({m, g, st} == 0) expect_r = {s, 63'd0};
    else expect_r = round_exact(s, W'({m, g, st}), e - 1077, rm, expect_ovf);
    if ({m, g, st} == 0) expect_ovf = 0;
    checks++;
    if (result !== expect_r || overflow !== expect_ovf) begin
      failures++;
      if (failures < 10)
        $display("FAIL s=%b e=%0d m=%h g=%b st=%b rm=%0d: %h/%b expected %h/%b",
                 s, e, m, g, st, rm, result, overflow, expect_r, expect_ovf);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rm = 0; rm < 4; rm++) begin
      for (int s = 0; s < 2; s++) begin
        for (int gs = 0; gs < 4; gs++) begin
          check(s, 1023, {1'b1, 52'd0}, gs[1], gs[0], rm);              // even lsb
          check(s, 1023, {1'b1, 51'd0, 1'b1}, gs[1], gs[0], rm);        // odd lsb
          check(s, 1000, '1, gs[1], gs[0], rm);                         // carry out
          check(s, 2046, '1, gs[1], gs[0], rm);                         // overflow by rounding
          check(s, 2047, {1'b1, 52'd5}, gs[1], gs[0], rm);              // overflow outright
          check(s, 1, {1'b0, {52{1'b1}}}, gs[1], gs[0], rm);            // denormal to normal
          check(s, 1, {1'b0, 52'd1}, gs[1], gs[0], rm);                 // small denormal
          check(s, 1, 53'd0, gs[1], gs[0], rm);                         // rounds to min denormal or 0
        end
      end
    end
    for (int n = 0; n < 20000; n++) begin
      logic [52:0] m;
      int e;
      m = {1'b1, 52'({$urandom, $urandom})};
      e = $urandom_range(1, 2050);
      if (e == 1 && $urandom_range(0, 1)) m[52] = 0;
      check($urandom_range(0, 1), e, m, $urandom_range(0, 1), $urandom_range(0, 1),
            2'($urandom_range(0, 3)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
