// tb_cplx_mac -- self-checking test of the complex double multiply-accumulate.
//
// Random complex operands with parts in (-1, 1), the range of quantum
// amplitudes and gate coefficients. The expected value is computed with the
// simulator's double arithmetic in the unit's documented evaluation order:
//   re = acc.re + (a.re*b.re - a.im*b.im),  im = acc.im + (a.re*b.im + a.im*b.re)
// and compared bit for bit.
module tb_cplx_mac;
  import fp64_pkg::*;
  cplx_t acc, a, b, y;
  int checks = 0, failures = 0;

  cplx_mac dut (.acc(acc), .a(a), .b(b), .y(y));

  function automatic real rnd_r();
    return (real'($urandom % 2000001) - 1000000.0) / 1048576.0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ar, ai, br, bi, cr, ci, er, ei;
    for (int i = 0; i < 4000; i++) begin
      ar = rnd_r(); ai = rnd_r(); br = rnd_r(); bi = rnd_r();
      cr = (i % 4 == 0) ? 0.0 : rnd_r();
      ci = (i % 4 == 0) ? 0.0 : rnd_r();
      if (i % 7 == 0) begin ai = 0.0; bi = 0.0; end
      a   = '{re: $realtobits(ar), im: $realtobits(ai)};
      b   = '{re: $realtobits(br), im: $realtobits(bi)};
      acc = '{re: $realtobits(cr), im: $realtobits(ci)};
      #1;
      er = cr + (ar * br - ai * bi);
      ei = ci + (ar * bi + ai * br);
      checks += 2;
      if (y.re !== $realtobits(er) && !(er == 0.0 && $bitstoreal(y.re) == 0.0)) begin
        failures++;
        if (failures < 10) $display("re mismatch: got %h exp %h", y.re, $realtobits(er));
      end
      if (y.im !== $realtobits(ei) && !(ei == 0.0 && $bitstoreal(y.im) == 0.0)) begin
        failures++;
        if (failures < 10) $display("im mismatch: got %h exp %h", y.im, $realtobits(ei));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
