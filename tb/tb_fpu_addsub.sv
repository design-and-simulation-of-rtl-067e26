// tb_fpu_addsub: self-checking test of the pipelined adder/subtractor.
//
// Operand pairs (random patterns, nearly equal numbers that cancel, huge and
// tiny numbers, denormals, zeros, infinities, NaNs) are issued with fpu_op
// and rmode random, on most clocks back to back. Every result is compared
// with the exact-arithmetic reference model, and round-to-nearest results
// also with the simulator's own double arithmetic. Each result must appear
// with ready exactly on the third clock edge counting the one that sampled
// the operands, one result per issued pair and in order. A reset in mid
// stream must clear out and ready and drop what was in flight.
module tb_fpu_addsub;
  import fp_ref_pkg::*;

  localparam int N_OPS   = 6000;
  localparam int LATENCY = 2;     // edges after the sampling edge

  logic        clk = 0, rst = 1, enable = 0, fpu_op = 0;
  logic [1:0]  rmode = 0;
  logic [63:0] opa = 0, opb = 0, out;
  logic        ready;

  int checks = 0, failures = 0, cyc = 0, issued = 0;

  typedef struct {
    logic [63:0] expect_out;
    int          edge_no;
    logic [63:0] a, b;
    bit          op;
    bit [1:0]    rm;
  } op_t;
  op_t pending[$];

  fpu_addsub dut (.clk, .rst, .enable, .rmode, .fpu_op, .opa, .opb, .out, .ready);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL cycle %0d: %s", cyc, msg);
  endtask

  initial begin
    repeat (20 * N_OPS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result monitor
  always @(negedge clk) begin
    if (!rst && ready) begin
      op_t o;
      checks++;
      if (pending.size() == 0) fail("ready with nothing in flight");
      else begin
        o = pending.pop_front();
        if (out !== o.expect_out)
          fail($sformatf("%h %s %h rm=%0d gave %h, expected %h", o.a, o.op ? "-" : "+",
                         o.b, o.rm, out, o.expect_out));
        checks++;
        if (cyc != o.edge_no + LATENCY)
          fail($sformatf("latency %0d edges, expected %0d", cyc - o.edge_no, LATENCY));
      end
    end
  end

  task automatic issue(logic [63:0] a, logic [63:0] b, bit op, bit [1:0] rm);
    op_t o;
    bit ovf;
    real r;
    @(negedge clk);
    opa = a; opb = b; fpu_op = op; rmode = rm; enable = 1;
    o.a = a; o.b = b; o.op = op; o.rm = rm;
    o.expect_out = ref_add(a, b, op, rm, ovf);
    o.edge_no = cyc + 1;
    // independent cross-check of the reference in round-to-nearest mode
    if (rm == 0 && !is_nan(o.expect_out)) begin
      r = op ? $bitstoreal(a) - $bitstoreal(b) : $bitstoreal(a) + $bitstoreal(b);
      checks++;
      if ($realtobits(r) != o.expect_out && !(r == 0.0 && o.expect_out[62:0] == 0))
        fail($sformatf("reference disagrees with real arithmetic for %h, %h", a, b));
    end
    pending.push_back(o);
    issued++;
  endtask

  task automatic idle(int n);
    repeat (n) begin
      @(negedge clk);
      enable = 0;
      opa = rand64(); opb = rand64();   // must be ignored
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // directed cases
    issue(64'h3FF0_0000_0000_0000, 64'h3FF0_0000_0000_0000, 0, 0);  // 1 + 1
    issue(64'h3FF0_0000_0000_0000, 64'h3FF0_0000_0000_0000, 1, 0);  // 1 - 1
    issue(64'h3FF0_0000_0000_0000, 64'h3FF0_0000_0000_0000, 1, 3);  // 1 - 1, -0
    issue(64'h7FEF_FFFF_FFFF_FFFF, 64'h7FEF_FFFF_FFFF_FFFF, 0, 0);  // overflow
    issue(64'h7FEF_FFFF_FFFF_FFFF, 64'h7FEF_FFFF_FFFF_FFFF, 0, 1);  // overflow, to zero
    issue(64'h0010_0000_0000_0000, 64'h0010_0000_0000_0001, 1, 0);  // denormal result
    issue(64'h7FF0_0000_0000_0000, 64'h7FF0_0000_0000_0000, 1, 0);  // inf - inf
    issue(64'h3FF0_0000_0000_0000, 64'h3CA0_0000_0000_0000, 0, 0);  // tie to even
    issue(64'h3FF0_0000_0000_0001, 64'h3CA0_0000_0000_0000, 0, 0);  // tie, round up
    for (int rm = 0; rm < 4; rm++) begin
      issue(64'h3FF0_0000_0000_0000, 64'h3C90_0000_0000_0000, 0, rm);
      issue(64'hBFF0_0000_0000_0000, 64'h3C90_0000_0000_0000, 1, rm);
    end
    idle(4);
    for (int n = 0; n < N_OPS; n++) begin
      int ne;
      logic [63:0] a;
      ne = $urandom_range(3, 2043);
      a  = gen_operand(ne);
      if ($urandom_range(0, 1)) ne = int'(a[62:52]);
      issue(a, gen_operand(ne), $urandom_range(0, 1), 2'($urandom_range(0, 3)));
      if ($urandom_range(0, 9) == 0) idle($urandom_range(1, 3));
      if (n == N_OPS / 2) begin
        // reset with operations in flight
        @(negedge clk);
        enable = 0;
        rst = 1;
        @(negedge clk);
        @(negedge clk);
        checks++;
        if (ready !== 0 || out !== 0) fail("reset did not clear out/ready");
        pending.delete();
        rst = 0;
      end
    end
    idle(LATENCY + 3);
    checks++;
    if (pending.size() != 0) fail($sformatf("%0d results never appeared", pending.size()));
    $display("issued %0d operations", issued);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
