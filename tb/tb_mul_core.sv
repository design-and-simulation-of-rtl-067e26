// tb_mul_core: checks the 53 x 53-bit partial-product multiplier against a
// plain 106-bit multiplication, on corner values (zero, one, all ones, single
// bits in every partial-product field) and on random significands.
module tb_mul_core;
  logic [52:0]  mul_a, mul_b;
  logic [105:0] product;
  int checks = 0, failures = 0;

  mul_core dut (.mul_a, .mul_b, .product);

  task automatic check(logic [52:0] a, logic [52:0] b);
    logic [105:0] expect_p;
    mul_a = a;
    mul_b = b;
    #1;
    expect_p = 106'(a) * 106'(b);
    checks++;
    if (product !== expect_p) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", a, b, product, expect_p);
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
    check('0, '0);
    check('1, '1);
    check(53'd1, '1);
    check('1, 53'd1);
    for (int i = 0; i < 53; i++)
      for (int j = 0; j < 53; j += 3) check(53'd1 << i, 53'd1 << j);
    for (int n = 0; n < 20000; n++) check({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
