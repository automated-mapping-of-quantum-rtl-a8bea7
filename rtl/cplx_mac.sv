// cplx_mac -- complex double-precision multiply-accumulate unit.
//
// y = acc + a * b for complex a, b, acc whose parts are IEEE-754 doubles.
// This is the arithmetic core of every emulation kernel: one matrix element
// times one state amplitude (or matrix element) added to a running sum.
// It is built from four multipliers and four adders:
//   y.re = acc.re + (a.re*b.re - a.im*b.im)
//   y.im = acc.im + (a.re*b.im + a.im*b.re)
// The unit is combinational; the kernels register y every clock, so one
// complex MAC completes per cycle. The evaluation order above is this
// design's choice and is what a bit-exact reference must follow.
module cplx_mac
  import fp64_pkg::*;
(
  input  cplx_t acc,
  input  cplx_t a,
  input  cplx_t b,
  output cplx_t y
);
  fp64_t rr, ii, ri, ir, pre, pim;

  fp64_mul u_rr (.a(a.re), .b(b.re), .y(rr));
  fp64_mul u_ii (.a(a.im), .b(b.im), .y(ii));
  fp64_mul u_ri (.a(a.re), .b(b.im), .y(ri));
  fp64_mul u_ir (.a(a.im), .b(b.re), .y(ir));

  fp64_add u_pre (.a(rr), .b(ii), .sub(1'b1), .y(pre));
  fp64_add u_pim (.a(ri), .b(ir), .sub(1'b0), .y(pim));

  fp64_add u_yre (.a(acc.re), .b(pre), .sub(1'b0), .y(y.re));
  fp64_add u_yim (.a(acc.im), .b(pim), .sub(1'b0), .y(y.im));
endmodule
