// fp64_add -- combinational IEEE-754 binary64 adder/subtractor.
//
// y = a + b when sub = 0, y = a - b when sub = 1, rounded to nearest even.
// Purely combinational: the result is valid in the same cycle as the
// operands. Subnormals are read and written as signed zero, NaN operands give
// the canonical quiet NaN (choices of this implementation; the emulator only
// asks for 64-bit floating point). The arithmetic itself lives in fp64_pkg.
module fp64_add
  import fp64_pkg::*;
(
  input  fp64_t a,
  input  fp64_t b,
  input  logic  sub,
  output fp64_t y
);
  always_comb y = sub ? fp_sub(a, b) : fp_add(a, b);
endmodule
