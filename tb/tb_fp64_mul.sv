// tb_fp64_mul -- self-checking test of the binary64 multiplier.
//
// Random normal operands whose product stays normal, plus directed cases
// (signed zeros, one, exact halves, the gate coefficient 1/sqrt(2)). Each
// result is compared bit for bit with the simulator's double arithmetic.
module tb_fp64_mul;
  import fp64_pkg::*;
  fp64_t a, b, y;
  int checks = 0, failures = 0;

  fp64_mul dut (.a(a), .b(b), .y(y));

  function automatic fp64_t rnd_fp(int ebase, int espan);
    fp64_t v;
    v[63]    = 1'($urandom);
    v[62:52] = 11'(ebase + int'($urandom % espan));
    v[51:0]  = {20'($urandom), 32'($urandom)};
    return v;
  endfunction

  task automatic check_one(fp64_t x, fp64_t z);
    fp64_t exp_y;
    a = x; b = z;
    #1;
    exp_y = $realtobits($bitstoreal(x) * $bitstoreal(z));
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH %h * %h : got %h exp %h", x, z, y, exp_y);
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
    check_one(FP_ONE, FP_ONE);
    check_one(FP_ZERO, FP_ONE);
    check_one({1'b1, 63'd0}, FP_ONE);
    check_one($realtobits(0.7071067811865476), $realtobits(0.7071067811865476));
    check_one($realtobits(-0.7071067811865476), $realtobits(0.5));
    check_one($realtobits(3.0), $realtobits(1.0/3.0));
    check_one($realtobits(1.5), $realtobits(1.5));
    for (int i = 0; i < 8000; i++)
      check_one(rnd_fp(800, 400), rnd_fp(800, 400));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
