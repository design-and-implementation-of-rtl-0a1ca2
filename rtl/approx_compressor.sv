// Approximate 4:2 compressor (no carry-in, no carry-out) used throughout the
// reduction tree. Four bits of weight 1 are reduced to a sum bit (weight 1)
// and a carry bit (weight 2):
//   carry = a1 | a2
//   sum   = (a1 ^ a2) ? (a3 & a4) : (a3 | a4)
// It is one NAND/NOR building block (dsc_cell) whose inverted outputs are
// restored to true polarity, which is what a second, complementary stage of
// the cascade does. The result 2*carry + sum equals the number of ones except
// for four input patterns: it reads one too high when exactly one of a1, a2 is
// set and a3 = a4 = 0 (patterns 0100, 1000 as a1a2a3a4), and one too low when
// a3 = a4 = 1 and a1 = a2 (patterns 0011, 1111). Combinational only.
module approx_compressor (
  input  logic a1,
  input  logic a2,
  input  logic a3,
  input  logic a4,
  output logic sum,
  output logic carry
);
  logic carry_n, sum_n;

  dsc_cell u_cell (
    .a1(a1), .a2(a2), .a3(a3), .a4(a4),
    .carry_n(carry_n), .sum_n(sum_n)
  );

  assign carry = ~carry_n;
  assign sum   = ~sum_n;
endmodule
