// tb_fp64_add -- self-checking test of the binary64 adder/subtractor.
//
// Random normal operands (exponents kept in a band that cannot produce
// subnormal or overflowing results) plus directed cases: exact cancellation,
// signed zeros, huge exponent gaps, near-cancellation. Each result is
// compared bit for bit with the simulator's own double arithmetic.
module tb_fp64_add;
  import fp64_pkg::*;
  fp64_t a, b, y;
  logic  sub;
  int checks = 0, failures = 0;

  fp64_add dut (.a(a), .b(b), .sub(sub), .y(y));

  function automatic fp64_t rnd_fp(int ebase, int espan);
    fp64_t v;
    v[63]    = 1'($urandom);
    v[62:52] = 11'(ebase + int'($urandom % espan));
    v[51:0]  = {20'($urandom), 32'($urandom)};
    return v;
  endfunction

  task automatic check_one(fp64_t x, fp64_t z, logic s);
    real r;
    fp64_t exp_y;
    a = x; b = z; sub = s;
    #1;
    r = s ? ($bitstoreal(x) - $bitstoreal(z)) : ($bitstoreal(x) + $bitstoreal(z));
    exp_y = $realtobits(r);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH %h %s %h : got %h exp %h", x, s ? "-" : "+", z, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp64_t x;
    // directed
    check_one(FP_ONE, FP_ONE, 1'b1);                       // 1 - 1 = +0
    check_one(FP_ONE, FP_ONE, 1'b0);                       // 2
    check_one(FP_ZERO, FP_ZERO, 1'b0);
    check_one({1'b1, 63'd0}, {1'b1, 63'd0}, 1'b0);         // -0 + -0
    check_one({1'b1, 63'd0}, FP_ZERO, 1'b0);               // -0 + +0
    check_one(FP_ZERO, FP_ONE, 1'b1);                      // 0 - 1
    check_one($realtobits(0.7071067811865476), $realtobits(0.7071067811865475), 1'b1);
    check_one($realtobits(1.0e10), $realtobits(1.0e-10), 1'b0);
    check_one($realtobits(1.0), $realtobits(1.1102230246251565e-16), 1'b0); // tie
    check_one($realtobits(1.0), $realtobits(1.1102230246251568e-16), 1'b0);
    check_one($realtobits(-3.5), $realtobits(0.25), 1'b0);
    // random, same exponent band
    for (int i = 0; i < 3000; i++)
      check_one(rnd_fp(1013, 20), rnd_fp(1013, 20), 1'($urandom));
    // random, close exponents (cancellation)
    for (int i = 0; i < 3000; i++) begin
      x = rnd_fp(1020, 2);
      check_one(x, {x[63:20], 20'($urandom)}, 1'($urandom));
    end
    // random, wide exponent gaps
    for (int i = 0; i < 2000; i++)
      check_one(rnd_fp(900, 200), rnd_fp(900, 200), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
