// fp64_mul -- combinational IEEE-754 binary64 multiplier.
//
// y = a * b, rounded to nearest even, valid in the same cycle as the
// operands. The 53 x 53 significand product is kept in full before rounding.
// Subnormals are read and written as signed zero, NaN operands and inf * 0
// give the canonical quiet NaN (choices of this implementation). The
// arithmetic itself lives in fp64_pkg.
module fp64_mul
  import fp64_pkg::*;
(
  input  fp64_t a,
  input  fp64_t b,
  output fp64_t y
);
  always_comb y = fp_mul(a, b);
endmodule
