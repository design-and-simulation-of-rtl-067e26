// tb_fpu_top: end-to-end test of the two units together, at the design's
// default (and only) configuration.
//
// On every clock the adder/subtractor and the multiplier each get a new
// operand pair with probability 7/8, independently, so both pipelines run
// full and in parallel. Every result is compared with the exact-arithmetic
// reference model and must come out on the third clock edge counting the one
// that sampled its operands. The test also counts how often each mechanism of
// the design was exercised, and fails if one never was: addition,
// subtraction, exponent alignment, fraction overflow, left normalisation,
// exact zero, exponent overflow, denormal results, each rounding mode,
// special operands, the multiplier's one-bit left shift and no-shift cases,
// its right shift into the denormal range, back-to-back results on
// consecutive clocks, both units answering in the same clock, and a reset
// with operations in flight. The example 0x40F5F8F000000000 *
// 0x4060000000000000 (90000 * 128) rounding up is among the operations.
module tb_fpu_top;
  import fp_ref_pkg::*;

  localparam int N_CYCLES = 12000;
  localparam int LATENCY  = 2;      // edges after the sampling edge

  logic        clk = 0, rst = 1;
  logic        add_enable = 0, add_fpu_op = 0, mul_enable = 0;
  logic [1:0]  add_rmode = 0, mul_rmode = 0;
  logic [63:0] add_opa = 0, add_opb = 0, mul_opa = 0, mul_opb = 0;
  logic [63:0] add_out, mul_outfp;
  logic        add_ready, mul_ready;

  int checks = 0, failures = 0, cyc = 0;

  typedef enum int {
    M_ADD, M_SUB, M_ALIGN, M_FRAC_OVF, M_NORM_LEFT, M_ZERO, M_ADD_OVF, M_ADD_DENORM,
    M_RM0, M_RM1, M_RM2, M_RM3, M_SPECIAL,
    M_MUL_SHIFT1, M_MUL_NOSHIFT, M_MUL_RSHIFT, M_MUL_OVF, M_MUL_EXAMPLE,
    M_ADD_B2B, M_MUL_B2B, M_BOTH, M_RESET, M_COUNT
  } mech_e;
  int mech[M_COUNT];

  typedef struct {
    logic [63:0] expect_out;
    int          edge_no;
  } op_t;
  op_t add_q[$], mul_q[$];

  fpu_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL cycle %0d: %s", cyc, msg);
  endtask

  initial begin
    repeat (N_CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expo(logic [63:0] x);
    return (x[62:52] == 0) ? 1 : int'(x[62:52]);
  endfunction

  // result monitor for both units
  bit add_prev = 0, mul_prev = 0;
  always @(negedge clk) begin
    if (!rst) begin
      if (add_ready) begin
        op_t o;
        checks += 2;
        if (add_q.size() == 0) fail("adder ready with nothing in flight");
        else begin
          o = add_q.pop_front();
          if (add_out !== o.expect_out) fail($sformatf("adder gave %h, expected %h", add_out, o.expect_out));
          if (cyc != o.edge_no + LATENCY) fail("adder latency");
        end
        if (add_prev) mech[M_ADD_B2B]++;
      end
      if (mul_ready) begin
        op_t o;
        checks += 2;
        if (mul_q.size() == 0) fail("multiplier ready with nothing in flight");
        else begin
          o = mul_q.pop_front();
          if (mul_outfp !== o.expect_out) fail($sformatf("multiplier gave %h, expected %h", mul_outfp, o.expect_out));
          if (cyc != o.edge_no + LATENCY) fail("multiplier latency");
        end
        if (mul_prev) mech[M_MUL_B2B]++;
      end
      if (add_ready && mul_ready) mech[M_BOTH]++;
    end
    add_prev = add_ready;
    mul_prev = mul_ready;
  end

  task automatic issue_add(logic [63:0] a, logic [63:0] b, bit op, bit [1:0] rm);
    op_t o;
    bit ovf, fin;
    logic [63:0] r;
    int emax;
    add_opa = a; add_opb = b; add_fpu_op = op; add_rmode = rm; add_enable = 1;
    r = ref_add(a, b, op, rm, ovf);
    o.expect_out = r;
    o.edge_no = cyc + 1;
    add_q.push_back(o);
    // which mechanisms this operation exercises
    fin  = !is_nan(a) && !is_nan(b) && !is_inf(a) && !is_inf(b);
    emax = expo(a) > expo(b) ? expo(a) : expo(b);
    mech[op ? M_SUB : M_ADD]++;
    if (!fin) mech[M_SPECIAL]++;
    else begin
      mech[M_RM0 + int'(rm)]++;
      if (!is_zero(a) && !is_zero(b) && expo(a) != expo(b)) mech[M_ALIGN]++;
      if ((a[63] == (b[63] ^ op)) && !is_zero(a) && !is_zero(b) && int'(r[62:52]) > emax)
        mech[M_FRAC_OVF]++;
      if ((a[63] != (b[63] ^ op)) && !is_zero(r) && int'(r[62:52]) < emax - 1)
        mech[M_NORM_LEFT]++;
      if (is_zero(r) && !(is_zero(a) && is_zero(b))) mech[M_ZERO]++;
      if (ovf) mech[M_ADD_OVF]++;
      if (r[62:52] == 0 && !is_zero(r)) mech[M_ADD_DENORM]++;
    end
  endtask

  task automatic issue_mul(logic [63:0] a, logic [63:0] b, bit [1:0] rm);
    op_t o;
    bit ovf;
    logic [63:0] r;
    logic [105:0] p;
    mul_opa = a; mul_opb = b; mul_rmode = rm; mul_enable = 1;
    r = ref_mul(a, b, rm, ovf);
    o.expect_out = r;
    o.edge_no = cyc + 1;
    mul_q.push_back(o);
    if (a == 64'h40F5_F8F0_0000_0000 && b == 64'h4060_0000_0000_0000 && rm == 2)
      mech[M_MUL_EXAMPLE]++;
    if (!is_nan(a) && !is_nan(b) && !is_inf(a) && !is_inf(b) && !is_zero(a) && !is_zero(b)) begin
      p = 106'({a[62:52] != 0, a[51:0]}) * 106'({b[62:52] != 0, b[51:0]});
      if (a[62:52] != 0 && b[62:52] != 0) mech[p[105] ? M_MUL_NOSHIFT : M_MUL_SHIFT1]++;
      if (expo(a) + expo(b) - 1022 < 1) mech[M_MUL_RSHIFT]++;
      if (ovf) mech[M_MUL_OVF]++;
    end
  endtask

  function automatic logic [63:0] mul_partner(logic [63:0] a);
    int ne;
    ne = $urandom_range(0, 2) == 0 ? $urandom_range(3, 2043)
                                   : 2046 - expo(a) + $urandom_range(0, 120) - 60;
    if (ne < 3) ne = 3;
    if (ne > 2043) ne = 2043;
    return gen_operand(ne);
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    issue_mul(64'h40F5_F8F0_0000_0000, 64'h4060_0000_0000_0000, 2);
    issue_add(64'h40F5_F8F0_0000_0000, 64'h4060_0000_0000_0000, 1, 0);
    for (int n = 0; n < N_CYCLES; n++) begin
      @(negedge clk);
      add_enable = 0;
      mul_enable = 0;
      if (n == N_CYCLES / 2) begin
        // reset with operations in flight in both units
        rst = 1;
        @(negedge clk);
        @(negedge clk);
        checks++;
        if (add_ready || mul_ready || add_out != 0 || mul_outfp != 0)
          fail("reset did not clear the outputs");
        add_q.delete();
        mul_q.delete();
        mech[M_RESET]++;
        rst = 0;
        @(negedge clk);
      end
      if ($urandom_range(0, 7) != 0) begin
        logic [63:0] a;
        int ne;
        ne = $urandom_range(3, 2043);
        a  = gen_operand(ne);
        if ($urandom_range(0, 1)) ne = expo(a);
        issue_add(a, gen_operand(ne), $urandom_range(0, 1), 2'($urandom_range(0, 3)));
      end
      if ($urandom_range(0, 7) != 0) begin
        logic [63:0] a;
        a = gen_operand($urandom_range(3, 2043));
        issue_mul(a, mul_partner(a), 2'($urandom_range(0, 3)));
      end
    end
    @(negedge clk);
    add_enable = 0;
    mul_enable = 0;
    repeat (LATENCY + 3) @(negedge clk);
    checks++;
    if (add_q.size() != 0 || mul_q.size() != 0) fail("results missing at the end");
    for (int m = 0; m < M_COUNT; m++) begin
      mech_e me;
      me = mech_e'(m);
      $display("mechanism %-14s %0d", me.name(), mech[m]);
      checks++;
      if (mech[m] == 0) fail($sformatf("mechanism %s never happened", me.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
